// Self-checking test of ssu_flash_ctrl with the behavioural flash model.
// A random library (feature lengths 39, 13 and 12, 1..8 mixtures) is walked
// with random hold cycles; every emitted group of up to 4 dimensions is
// compared with the library: words, lane enables, dimension base, first /
// last flags, mixture weight and reciprocal, senone ID and the last-group-of-
// senone flag. Also checks the table read mode returns lines 0..N-1 in
// order, and that at most one flash read is outstanding.
module tb_ssu_flash_ctrl;
  import asr_pkg::*;
  `include "acoustic_lib.svh"
  localparam int LIB = 200;
  logic clk = 0, rst_n = 0, start = 0, hold = 0, done, tbl_start = 0, tbl_valid, tbl_take = 0;
  logic [31:0] lib_offset = LIB, fl_addr;
  logic fl_req, fl_rvalid;
  logic [767:0] fl_rdata, tbl_line;
  logic dim_valid, dim_first, dim_last, sen_last;
  logic [3:0] dim_en;
  logic [31:0] dim_word [4];
  logic [5:0] dim_base;
  score_t mix_weight, mix_recip;
  logic [15:0] sen_id;
  logic [7:0] tbl_lines = 10;
  int checks = 0, failures = 0, cyc = 0, outstanding = 0, max_out = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    outstanding <= outstanding + (fl_req ? 1 : 0) - (fl_rvalid ? 1 : 0);
    if (outstanding > max_out) max_out <= outstanding;
  end
  ssu_flash_ctrl dut (.*);
  nor_flash_model #(.W(768), .LAT(8)) fl (.clk, .req(fl_req), .addr(fl_addr), .rvalid(fl_rvalid), .rdata(fl_rdata));

  // expected groups
  typedef struct { logic [31:0] w [4]; logic [3:0] en; int base; bit first, last, slast; int wt, rc, id; } grp_t;
  grp_t exp_q[$];

  task automatic walk(int feat_len, int ns);
    int unsigned w[$];
    sen_t s;
    int t0;
    exp_q.delete();
    w.push_back(ns);
    for (int i = 0; i < ns; i++) begin
      s = rand_senone(i + 1, $urandom_range(1, 8), feat_len);
      senone_words(s, feat_len, w);
      for (int m = 0; m < s.nmix; m++)
        for (int b = 0; b < feat_len; b += 4) begin
          grp_t g;
          for (int l = 0; l < 4; l++)
            g.w[l] = (b + l < feat_len) ? {16'(s.prec[m][b + l]), 16'(s.mean[m][b + l])} : 32'h0;
          g.en = 4'((1 << ((feat_len - b >= 4) ? 4 : feat_len - b)) - 1);
          g.base = b; g.first = (b == 0); g.last = (b + 4 >= feat_len);
          g.slast = g.last && (m == s.nmix - 1);
          g.wt = s.weight[m]; g.rc = s.recip[m]; g.id = s.id;
          exp_q.push_back(g);
        end
    end
    for (int i = 0; i < w.size(); i += 24) begin
      logic [767:0] line;
      line = '0;
      for (int j = 0; j < 24 && i + j < w.size(); j++) line[32*j +: 32] = w[i + j];
      fl.mem[LIB + i / 24] = line;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = cyc;
    while (!done && cyc - t0 < 100000) begin
      hold = ($urandom_range(0, 3) == 0);
      #1;
      if (dim_valid) begin
        grp_t g;
        bit ok;
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL extra group"); end
        else begin
          g = exp_q.pop_front();
          ok = dim_en == g.en && int'(dim_base) == g.base && dim_first == g.first && dim_last == g.last &&
               sen_last == g.slast && int'(mix_weight) == g.wt && int'(mix_recip) == g.rc && int'(sen_id) == g.id;
          for (int l = 0; l < 4; l++) if (g.en[l] && dim_word[l] != g.w[l]) ok = 0;
          if (!ok) begin failures++; $display("FAIL group id %0d base %0d", g.id, g.base); end
        end
      end
      @(negedge clk);
    end
    hold = 0;
    checks++;
    if (!done || exp_q.size() != 0) begin failures++; $display("FAIL walk: done %b, %0d groups left", done, exp_q.size()); end
  endtask

  initial begin
    for (int l = 0; l < 20; l++) begin
      logic [767:0] line;
      for (int j = 0; j < 24; j++) line[32*j +: 32] = 32'(l * 1000 + j);
      fl.mem[l] = line;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // table mode
    @(negedge clk); tbl_start = 1; @(negedge clk); tbl_start = 0;
    for (int l = 0; l < 10; l++) begin
      int t0;
      t0 = cyc;
      while (!tbl_valid && cyc - t0 < 100) @(negedge clk);
      checks++;
      if (!tbl_valid || tbl_line[31:0] != 32'(l * 1000)) begin failures++; $display("FAIL table line %0d", l); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      tbl_take = 1; @(negedge clk); tbl_take = 0;
    end
    walk(39, 25);
    walk(13, 30);
    walk(12, 10);
    walk(39, 1);
    checks++;
    if (max_out > 1) begin failures++; $display("FAIL %0d reads outstanding", max_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
