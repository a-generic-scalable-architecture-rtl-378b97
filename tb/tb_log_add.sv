// Self-checking test of log_add. The testbench builds the 4096-entry table
// itself (entry k = round(log_1.0003(1 + 1.0003^-(8k)))), loads it through
// the table write port and compares every result, two cycles after the
// operands, with the exact real-valued log_1.0003(1.0003^a + 1.0003^b).
// Tolerance is 5 units: the table is indexed by the difference divided by
// 8 and its slope is at most 1/2.
module tb_log_add;
  import asr_pkg::*;
  logic clk = 0, rst_n = 0, tbl_we = 0, in_valid = 0, out_valid;
  logic [11:0] tbl_addr = 0;
  logic [15:0] tbl_data = 0;
  score_t a, b, sum;
  int checks = 0, failures = 0;
  real lb;
  score_t qa[$], qb[$];
  int n_far = 0, n_near = 0, n_inf = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  log_add dut (.*);

  // sample at the falling edge so the checker never races the DUT flops
  always @(negedge clk) begin
    if (in_valid) begin qa.push_back(a); qb.push_back(b); end
    if (out_valid) begin
      score_t ea, eb, mx; real ex; longint e;
      ea = qa.pop_front(); eb = qb.pop_front();
      mx = (ea > eb) ? ea : eb;
      if (ea <= NEG_INF && eb <= NEG_INF) e = NEG_INF;
      else if (ea <= NEG_INF || eb <= NEG_INF) begin e = mx; n_inf++; end
      else begin
        ex = real'(mx) + $ln(1.0 + $exp(-real'((ea > eb) ? ea - eb : eb - ea) * lb)) / lb;
        e = longint'($rtoi(ex + 0.5));
        if (((ea > eb) ? ea - eb : eb - ea) > 32000) n_far++; else n_near++;
      end
      checks++;
      if (longint'(sum) - e > 5 || e - longint'(sum) > 5) begin
        failures++;
        $display("FAIL a=%0d b=%0d sum=%0d exp=%0d", ea, eb, sum, e);
      end
    end
  end

  initial begin
    lb = $ln(1.0003);
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4096; k++) begin
      real v;
      v = $ln(1.0 + $exp(-real'(8 * k) * lb)) / lb;
      tbl_we <= 1; tbl_addr <= 12'(k); tbl_data <= 16'($rtoi(v + 0.5));
      @(posedge clk);
    end
    tbl_we <= 0;
    @(posedge clk);
    // exact check of equal operands: log(2)/log(1.0003) = 2310.8
    for (int i = 0; i < 3000; i++) begin
      in_valid <= 1;
      a <= -score_t'($urandom_range(0, 4000000));
      case (i % 4)
        0: b <= NEG_INF;
        1: b <= -score_t'($urandom_range(0, 4000000));
        default: b <= -score_t'($urandom_range(0, 40000));
      endcase
      @(posedge clk);
      // back-to-back operation with occasional bubbles
      if (i % 11 == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    if (qa.size() != 0) begin failures++; $display("FAIL %0d results missing", qa.size()); end
    if (n_far == 0 || n_near == 0 || n_inf == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
