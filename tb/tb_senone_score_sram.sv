// Self-checking test of senone_score_sram: random writes to all four
// {bank, frame} planes, reads checked one cycle later against a model, reads
// and writes in the same cycle, and out-of-range addresses reading NEG_INF.
// Uses a reduced NUM_SENONES so every location can be visited.
module tb_senone_score_sram;
  import asr_pkg::*;
  localparam int N = 200;
  logic clk = 0, we = 0, wbank = 0, wframe = 0, rd = 0, rbank = 0, rframe = 0;
  logic [7:0] waddr = 0, raddr = 0;
  score_t wdata = 0, rdata;
  score_t model [4][256];
  int checks = 0, failures = 0;
  logic   pend = 0;
  score_t pexp;

  always #5 clk = ~clk;
  senone_score_sram #(.NUM_SENONES(N)) dut (.*);

  task automatic check_read();
    if (pend) begin
      checks++;
      if (rdata != pexp) begin failures++; $display("FAIL read got %0d exp %0d", rdata, pexp); end
    end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) for (int i = 0; i < 256; i++) model[p][i] = (i < N) ? 0 : NEG_INF;
    // initialise every location
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk); we = 1; wbank = p[1]; wframe = p[0]; waddr = 8'(i); wdata = 0;
      end
    @(negedge clk); we = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      check_read();
      we = ($urandom_range(0, 1) == 1);
      wbank = 1'($urandom); wframe = 1'($urandom); waddr = 8'($urandom_range(0, N - 1)); wdata = score_t'($urandom);
      rd = ($urandom_range(0, 2) != 0);
      rbank = 1'($urandom); rframe = 1'($urandom);
      raddr = (k % 50 == 0) ? 8'($urandom_range(N, 255)) : 8'($urandom_range(0, N - 1));
      if (k % 9 == 0) begin rbank = wbank; rframe = wframe; raddr = waddr; end
      pexp = model[{rbank, rframe}][raddr];
      if (we) model[{wbank, wframe}][waddr] = wdata;
      @(posedge clk);
      pend = rd;
    end
    @(negedge clk);
    check_read();
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
