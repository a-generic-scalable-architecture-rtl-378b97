// Self-checking test of the senone score unit with the behavioural flash
// model. Loads the log-add table from flash (INIT), then scores two blocks of
// two frames against a random 40-senone library with 1..8 mixtures of 39
// dimensions, checking every senone score of both frames (against
// acoustic_lib.svh's reference scorer), the SRAM bank and frame of every
// write, that each senone is written exactly once per frame, that pause
// stops flash traffic, and the block time: at most 24 cycles per mixture
// plus 16 per senone (about 10 cycles of 4-lane distance work per mixture
// of 39 dimensions plus the pipeline drain, since one mixture is in the
// arithmetic at a time).
module tb_ssu;
  import asr_pkg::*;
  `include "acoustic_lib.svh"
  localparam int LIB = 128, NS = 40, FL = 39;
  logic clk = 0, rst_n = 0, utt_start = 0, start = 0, bank = 0, pause = 0, done, init_start = 0, init_done;
  logic feat_we = 0, feat_frame = 0;
  logic [5:0] feat_idx = 0;
  logic signed [15:0] feat_data = 0;
  logic fl_req, fl_rvalid;
  logic [31:0] fl_addr, n_scored;
  logic [31:0] lib_offset = LIB;
  logic [767:0] fl_rdata;
  logic sc_we, sc_bank, sc_frame;
  logic [12:0] sc_addr;
  score_t sc_data;
  int checks = 0, failures = 0, cyc = 0;
  sen_t lib [NS];
  shortint fv [2][MAXD];
  score_t got [2][int];
  int writes_bad = 0, exp_bank = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;

  ssu dut (.*);
  nor_flash_model #(.W(768), .LAT(8)) fl (.clk, .req(fl_req), .addr(fl_addr), .rvalid(fl_rvalid), .rdata(fl_rdata));

  always @(negedge clk) if (sc_we) begin
    if (got[sc_frame].exists(int'(sc_addr)) || sc_bank != 1'(exp_bank)) writes_bad++;
    got[sc_frame][int'(sc_addr)] = sc_data;
  end

  task automatic load_feats();
    for (int f = 0; f < 2; f++)
      for (int d = 0; d < FL; d++) begin
        fv[f][d] = shortint'($urandom_range(0, 600)) - 300;
        @(negedge clk);
        feat_we = 1; feat_frame = 1'(f); feat_idx = 6'(d); feat_data = fv[f][d];
        @(negedge clk);
        feat_we = 0;
      end
  endtask

  task automatic run_block(int b, bit with_pause);
    int t0, nmix, reads0;
    got[0].delete(); got[1].delete(); writes_bad = 0; exp_bank = b;
    load_feats();
    @(negedge clk); start = 1; bank = 1'(b);
    @(negedge clk); start = 0;
    t0 = cyc;
    if (with_pause) begin
      repeat (300) @(negedge clk);
      pause = 1;
      repeat (20) @(negedge clk);
      reads0 = fl.reads;
      repeat (100) @(negedge clk);
      checks++;
      if (fl.reads != reads0) begin failures++; $display("FAIL flash read during pause"); end
      pause = 0;
    end
    while (!done && cyc - t0 < 200000) @(negedge clk);
    nmix = 0;
    for (int s = 0; s < NS; s++) nmix += lib[s].nmix;
    checks++;
    if (!done || (!with_pause && cyc - t0 > 24 * nmix + 16 * NS)) begin
      failures++; $display("FAIL block took %0d cycles for %0d mixtures", cyc - t0, nmix);
    end
    $display("block %0d: %0d senones, %0d mixtures, %0d cycles", b, NS, nmix, cyc - t0);
    for (int s = 0; s < NS; s++)
      for (int f = 0; f < 2; f++) begin
        longint e;
        e = ref_senone(lib[s], fv[f], FL);
        checks++;
        if (!got[f].exists(lib[s].id) || longint'(got[f][lib[s].id]) != e) begin
          failures++;
          $display("FAIL senone %0d frame %0d got %0d exp %0d", lib[s].id, f,
                   got[f].exists(lib[s].id) ? got[f][lib[s].id] : 0, e);
        end
      end
    checks++;
    if (writes_bad != 0 || got[0].size() != NS || n_scored != NS) begin
      failures++; $display("FAIL writes bad %0d count %0d n_scored %0d", writes_bad, got[0].size(), n_scored);
    end
  endtask

  initial begin
    int unsigned w[$];
    int t0;
    make_table();
    for (int l = 0; l < 86; l++) begin
      logic [767:0] line;
      for (int j = 0; j < 48; j++) line[16*j +: 16] = (l * 48 + j < 4096) ? 16'(lb_tbl[l * 48 + j]) : 16'd0;
      fl.mem[l] = line;
    end
    w.push_back(NS);
    for (int s = 0; s < NS; s++) begin
      lib[s] = rand_senone(s * 7 + 3, (s < 8) ? s + 1 : $urandom_range(1, 8), FL);
      senone_words(lib[s], FL, w);
    end
    for (int i = 0; i < w.size(); i += 24) begin
      logic [767:0] line;
      line = '0;
      for (int j = 0; j < 24 && i + j < w.size(); j++) line[32*j +: 32] = w[i + j];
      fl.mem[LIB + i / 24] = line;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); utt_start = 1; @(negedge clk); utt_start = 0;
    @(negedge clk); init_start = 1; @(negedge clk); init_start = 0;
    t0 = cyc;
    while (!init_done && cyc - t0 < 20000) @(negedge clk);
    checks++;
    if (!init_done) begin failures++; $display("FAIL init"); end
    for (int k = 0; k < 4096; k += 97) begin
      checks++;
      if (int'(dut.g_la[0].u_la.tbl[k]) != lb_tbl[k] || int'(dut.g_la[1].u_la.tbl[k]) != lb_tbl[k]) begin
        failures++; $display("FAIL table entry %0d", k);
      end
    end
    $display("table load: %0d cycles", cyc - t0);
    run_block(0, 0);
    run_block(1, 1);
    run_block(0, 0);
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
