// Self-checking test of vu_flash_ctrl with the behavioural flash model.
// Checks word-line and HMM-line reads return the right flash lines, that a
// repeated HMM position of the same word is served from the HMM cache
// without a flash read (hit flag and counters), that a different position
// mapping to the same cache line misses, that a word request purges
// the cache, and that bigram prefetch fills a slot's successor list from one
// or two lines, stopping at the 0xFFFF terminator, and that bg_clear empties
// every slot.
module tb_vu_flash_ctrl;
  import asr_pkg::*;
  localparam int WL = 65536, HL = 65536;
  logic clk = 0, rst_n = 0, req = 0, ack, hit, bg_clear = 0, fl_req, fl_rvalid;
  vsel_e sel = SEL_WORD;
  logic [15:0] id = 0;
  logic [3:0] pos = 0;
  logic [3:0] slot = 0;
  logic [255:0] line, fl_rdata;
  logic [15:0] bg_dest [16][14];
  score_t bg_prob [16][14];
  logic [4:0] bg_n [16];
  logic [31:0] lm_offset = 1000, fl_addr, n_hits, n_misses;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;
  vu_flash_ctrl dut (.*);
  nor_flash_model #(.W(256), .LAT(8)) fl (.clk, .req(fl_req), .addr(fl_addr), .rvalid(fl_rvalid), .rdata(fl_rdata));

  function automatic logic [255:0] tag_line(int a);
    logic [255:0] l;
    for (int j = 0; j < 8; j++) l[32*j +: 32] = 32'(a * 16 + j);
    return l;
  endfunction

  task automatic access(vsel_e s, int i, int p, int sl, output logic [255:0] l, output bit h, output int lat);
    int t0, r0;
    @(negedge clk);
    sel = s; id = 16'(i); pos = 4'(p); slot = 4'(sl); req = 1;
    t0 = cyc;
    while (!ack && cyc - t0 < 200) @(negedge clk);
    l = line; h = hit; lat = cyc - t0;
    req = 0;
    @(negedge clk);
  endtask

  task automatic expect_line(string what, logic [255:0] got, int addr);
    checks++;
    if (got != tag_line(addr)) begin failures++; $display("FAIL %s line %h", what, got[31:0]); end
  endtask

  initial begin
    logic [255:0] l; bit h; int lat, r0;
    for (int w = 0; w < 20; w++) fl.mem[1000 + w] = tag_line(1000 + w);
    for (int m = 0; m < 40; m++) fl.mem[1000 + WL + m] = tag_line(1000 + WL + m);
    // bigram rows: word 3 has 5 successors, word 4 has 14 (two full lines)
    for (int w = 3; w <= 4; w++)
      for (int k = 0; k < 2; k++) begin
        logic [255:0] b;
        b = '1;
        for (int j = 0; j < 7; j++)
          if (w == 4 || k * 7 + j < 5) b[32*j +: 32] = {16'(-(w * 100 + k * 7 + j)), 16'(w * 10 + k * 7 + j)};
        fl.mem[1000 + WL + HL + 2 * w + k] = b;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(SEL_WORD, 5, 0, 0, l, h, lat); expect_line("word", l, 1005);
    access(SEL_HMM, 7, 0, 0, l, h, lat);  expect_line("hmm0", l, 1000 + WL + 7);
    checks++; if (h) begin failures++; $display("FAIL first HMM access hit"); end
    access(SEL_HMM, 9, 1, 0, l, h, lat);  expect_line("hmm1", l, 1000 + WL + 9);
    r0 = fl.reads;
    access(SEL_HMM, 7, 0, 0, l, h, lat);  expect_line("hmm0 again", l, 1000 + WL + 7);
    checks++;
    if (!h || fl.reads != r0 || lat > 3) begin failures++; $display("FAIL cache hit: hit %b reads %0d lat %0d", h, fl.reads - r0, lat); end
    access(SEL_HMM, 9, 1, 0, l, h, lat);
    checks++; if (!h) begin failures++; $display("FAIL second cache hit"); end
    // position 5 maps to the same cache line as position 0: must miss
    access(SEL_HMM, 13, 5, 0, l, h, lat); expect_line("hmm5", l, 1000 + WL + 13);
    checks++; if (h) begin failures++; $display("FAIL position 5 hit on position 0's line"); end
    access(SEL_WORD, 6, 0, 0, l, h, lat); expect_line("word6", l, 1006);
    access(SEL_HMM, 11, 0, 0, l, h, lat); expect_line("hmm after purge", l, 1000 + WL + 11);
    checks++; if (h) begin failures++; $display("FAIL hit after purge"); end
    checks++;
    if (n_hits != 2 || n_misses != 4) begin failures++; $display("FAIL counters %0d %0d", n_hits, n_misses); end
    // bigram prefetch
    access(SEL_BIGRAM, 3, 0, 2, l, h, lat);
    access(SEL_BIGRAM, 4, 0, 9, l, h, lat);
    checks++;
    if (bg_n[2] != 5 || bg_n[9] != 14) begin failures++; $display("FAIL bigram counts %0d %0d", bg_n[2], bg_n[9]); end
    for (int k = 0; k < 14; k++) begin
      checks++;
      if (bg_dest[9][k] != 16'(40 + k) || bg_prob[9][k] != score_t'(-(400 + k)) ||
          (k < 5 && (bg_dest[2][k] != 16'(30 + k) || bg_prob[2][k] != score_t'(-(300 + k))))) begin
        failures++; $display("FAIL bigram entry %0d", k);
      end
    end
    @(negedge clk); bg_clear = 1; @(negedge clk); bg_clear = 0;
    checks++;
    if (bg_n[2] != 0 || bg_n[9] != 0) begin failures++; $display("FAIL bg_clear"); end
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
