// Self-checking test of distance_calc. Random mixtures of 1..40 dimensions
// are streamed 4 dimensions per cycle (last group partially enabled) for two
// frames at once, back to back and with gaps. Each result is compared with
// sum((y-mu)^2 * V >> 16) computed here, and must appear exactly 4 cycles
// after the mixture's last group (the pipeline depth).
module tb_distance_calc;
  import asr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  logic [3:0] lane_en = 0;
  logic signed [15:0] mean [4];
  logic [15:0]        prec [4];
  logic signed [15:0] feat [2][4];
  score_t             mdist [2];
  int checks = 0, failures = 0, cyc = 0;
  longint exp0[$], exp1[$];
  int     due[$];

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;
  distance_calc dut (.*);

  always @(negedge clk) begin
    if (out_valid) begin
      longint e0, e1; int d;
      e0 = exp0.pop_front(); e1 = exp1.pop_front(); d = due.pop_front();
      checks++;
      if (longint'(mdist[0]) != e0 || longint'(mdist[1]) != e1 || cyc != d) begin
        failures++;
        $display("FAIL got %0d %0d exp %0d %0d at cycle %0d due %0d", mdist[0], mdist[1], e0, e1, cyc, d);
      end
    end
  end

  initial begin
    for (int l = 0; l < 4; l++) begin mean[l] = 0; prec[l] = 0; feat[0][l] = 0; feat[1][l] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < 300; m++) begin
      int nd; longint s0, s1;
      nd = (m == 0) ? 39 : (m == 1) ? 1 : $urandom_range(1, 40);
      s0 = 0; s1 = 0;
      for (int b = 0; b < nd; b += 4) begin
        for (int l = 0; l < 4; l++) begin
          logic signed [15:0] mu, y0, y1; logic [15:0] v;
          mu = 16'($urandom); y0 = 16'($urandom); y1 = 16'($urandom); v = 16'($urandom);
          if (m % 3 == 0) begin mu = 16'($urandom_range(0, 400)); y0 = 16'($urandom_range(0, 400)); y1 = 16'($urandom_range(0, 400)); end
          mean[l] <= mu; prec[l] <= v; feat[0][l] <= y0; feat[1][l] <= y1;
          if (b + l < nd) begin
            s0 += ((longint'(y0) - longint'(mu)) ** 2 * longint'(v)) >>> 16;
            s1 += ((longint'(y1) - longint'(mu)) ** 2 * longint'(v)) >>> 16;
          end
        end
        lane_en  <= 4'((1 << ((nd - b >= 4) ? 4 : nd - b)) - 1);
        in_valid <= 1; in_first <= (b == 0); in_last <= (b + 4 >= nd);
        if (b + 4 >= nd) begin
          exp0.push_back(s0 > longint'(SCORE_MAX) ? longint'(SCORE_MAX) : s0);
          exp1.push_back(s1 > longint'(SCORE_MAX) ? longint'(SCORE_MAX) : s1);
          due.push_back(cyc + 1 + 4);
        end
        @(posedge clk);
        if (m % 7 == 0) begin in_valid <= 0; @(posedge clk); end
      end
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp0.size() != 0) begin failures++; $display("FAIL %0d results missing", exp0.size()); end
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
