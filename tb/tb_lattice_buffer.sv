// Self-checking test of lattice_buffer (word lattice FIFO). Random pushes and
// pops against a queue model, including filling it completely (full must
// rise at DEPTH entries and extra writes must be dropped), draining it, and
// clear. A small DEPTH is used so full is reached quickly.
module tb_lattice_buffer;
  import asr_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0, rd = 0, full;
  lattice_t wentry, rentry;
  logic [$clog2(D):0] count;
  lattice_t q[$];
  int checks = 0, failures = 0, n_full = 0, n_dropped = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  lattice_buffer #(.DEPTH(D)) dut (.*);

  task automatic step(bit w, bit r);
    lattice_t e, exp_e;
    bit do_r;
    @(negedge clk);
    e = lattice_t'({$urandom, $urandom, $urandom, $urandom});
    do_r = r && q.size() != 0;
    wr = w; wentry = e; rd = do_r;
    checks++;
    if (int'(count) != q.size() || full != (q.size() == D)) begin
      failures++; $display("FAIL count %0d exp %0d full %b", count, q.size(), full);
    end
    if (full) n_full++;
    if (do_r) exp_e = q.pop_front();
    if (w && (q.size() + (do_r ? 1 : 0)) < D + (do_r ? 1 : 0) && !full) q.push_back(e);
    else if (w) n_dropped++;
    @(posedge clk);
    @(negedge clk);
    wr = 0; rd = 0;
    if (do_r) begin
      checks++;
      if (rentry != exp_e) begin failures++; $display("FAIL data %h exp %h", rentry, exp_e); end
    end
  endtask

  initial begin
    wentry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D + 4; i++) step(1, 0);       // overfill
    for (int i = 0; i < D + 2; i++) step(0, 1);       // drain
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 2) != 0, $urandom_range(0, 1) == 1);
    for (int i = 0; i < 5; i++) step(1, 0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; q.delete();
    step(0, 0);
    if (n_full == 0 || n_dropped == 0) begin failures++; $display("FAIL full never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
