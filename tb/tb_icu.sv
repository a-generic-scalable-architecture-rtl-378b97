// Self-checking test of the interface control unit. The testbench plays the
// SPI slave (byte strobes, frame ends, response byte takes), the SSU and the
// VU (done pulses after a delay) and the lattice FIFO. Checks: every SET_*
// command lands in its configuration field; SET_UTTERANCE_ID restarts the
// utterance; INIT starts the table load and keeps busy until it is done;
// LOAD_FEATURE_BLOCK writes both frames' features to the right frame/index;
// blocks are scored in order into alternating banks, never more than two
// ahead of the VU, and every frame is decoded once in order with the right
// bank/frame index; a block sent while the previous one is still waiting
// counts as an overrun and is dropped; PAUSE/RESUME hold scheduling;
// READ_LATTICE returns a count byte and 14 bytes per entry, MSB first.
module tb_icu;
  import asr_pkg::*;
  logic clk = 0, rst_n = 0, rx_valid = 0, frame_end = 0, tx_mode, tx_take = 0;
  logic [7:0] rx_data = 0, tx_data;
  cfg_t cfg;
  logic [31:0] utt_id, n_overrun, n_blocks_scored, n_frames_decoded;
  logic utt_start, pause, init_start, init_done = 0, feat_we, feat_frame, ssu_start, ssu_bank, ssu_done = 0;
  logic vu_start, vu_bank, vu_fidx, vu_done = 0, lat_rd, lat_clear, busy;
  logic [5:0] feat_idx;
  logic signed [15:0] feat_data;
  logic [15:0] frame_no;
  lattice_t lat_entry = '0;
  logic [10:0] lat_count;
  int checks = 0, failures = 0, cyc = 0;
  lattice_t latq[$];
  logic signed [15:0] feats [2][39];
  int n_utt = 0, n_init = 0, n_fw = 0, fw_bad = 0, n_ssu = 0, n_vu = 0, sched_bad = 0, ssu_busy_c = 0, vu_busy_c = 0;
  int exp_frame = 0, exp_block = 0;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  icu dut (.*);

  assign lat_count = 11'(latq.size());
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (utt_start) n_utt++;
    if (init_start) n_init++;
    if (lat_rd) begin lat_entry <= latq.pop_front(); end
    if (feat_we) begin
      n_fw++;
      if (feat_data != feats[feat_frame][feat_idx]) fw_bad++;
    end
    // SSU model: done 40 cycles after start
    if (ssu_start) begin
      if (ssu_bank != 1'(exp_block % 2) || ssu_busy_c != 0) sched_bad++;
      exp_block++; n_ssu++; ssu_busy_c <= 40;
    end else if (ssu_busy_c > 0) ssu_busy_c <= ssu_busy_c - 1;
    ssu_done <= ssu_busy_c == 1;
    // VU model: done 25 cycles after start
    if (vu_start) begin
      if (int'(frame_no) != exp_frame || vu_bank != 1'((exp_frame / 2) % 2) || vu_fidx != 1'(exp_frame % 2) ||
          exp_frame / 2 >= n_blocks_scored || vu_busy_c != 0 || pause) sched_bad++;
      exp_frame++; n_vu++; vu_busy_c <= 25;
    end else if (vu_busy_c > 0) vu_busy_c <= vu_busy_c - 1;
    vu_done <= vu_busy_c == 1;
    if (ssu_start && pause) sched_bad++;
  end

  task automatic byte_in(logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic end_frame();
    @(negedge clk); frame_end = 1; @(negedge clk); frame_end = 0;
  endtask
  task automatic cmd(logic [7:0] op, logic [31:0] arg);
    byte_in(op);
    for (int k = 3; k >= 0; k--) byte_in(arg[8*k +: 8]);
    end_frame();
  endtask
  task automatic block();
    for (int f = 0; f < 2; f++) for (int d = 0; d < 39; d++) feats[f][d] = 16'($urandom);
    byte_in(8'h0B);
    for (int f = 0; f < 2; f++) for (int d = 0; d < 39; d++) begin byte_in(feats[f][d][15:8]); byte_in(feats[f][d][7:0]); end
    end_frame();
  endtask
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cfg.hmm_len == 3 && cfg.feat_len == 39 && cfg.max_mix == 8, "reset defaults");
    cmd(8'h01, 32'd500);    chk(cfg.am_offset == 500, "SET_ACOUSTIC_MODEL");
    cmd(8'h02, 32'd7000);   chk(cfg.lm_offset == 7000, "SET_LANGUAGE_MODEL");
    cmd(8'h03, 32'd123456); chk(cfg.hmm_beam == 123456, "SET_HMM_INIT_BEAM");
    cmd(8'h04, 32'd65432);  chk(cfg.word_beam == 65432, "SET_WORD_INIT_BEAM");
    cmd(8'h05, 32'd2500);   chk(cfg.maxhmmpf == 2500, "SET_MAXHMMPF");
    cmd(8'h06, 32'd15);     chk(cfg.maxwpf == 15, "SET_MAXWPF");
    cmd(8'h07, 32'd4);      chk(cfg.max_n_best == 4, "SET_MAX_N_BEST");
    cmd(8'h08, 32'd39);     chk(cfg.feat_len == 39, "SET_FEATURE_LENGTH");
    cmd(8'h09, 32'd3);      chk(cfg.hmm_len == 3, "SET_HMM_LENGTH");
    cmd(8'h0A, 32'd6);      chk(cfg.max_mix == 6, "SET_MAX_MIXTURES");
    // unknown opcode is ignored
    byte_in(8'h55); byte_in(8'h01); end_frame();
    chk(cfg.am_offset == 500, "unknown opcode ignored");
    // INIT
    byte_in(8'h0E); end_frame();
    chk(n_init == 1 && busy, "INIT starts table load");
    repeat (20) @(negedge clk);
    init_done = 1; @(negedge clk); init_done = 0;
    @(negedge clk);
    cmd(8'h0D, 32'hCAFE0001);
    chk(utt_id == 32'hCAFE0001 && n_utt == 1, "SET_UTTERANCE_ID");
    // blocks with the engines keeping up
    for (int b = 0; b < 3; b++) begin block(); repeat (10) @(negedge clk); end
    repeat (200) @(negedge clk);
    chk(n_fw == 3 * 78 && fw_bad == 0, "feature writes");
    chk(n_ssu == 3 && n_vu == 6 && n_frames_decoded == 6 && n_blocks_scored == 3, "3 blocks scored and decoded");
    // pause: a block waits; a second block meanwhile is an overrun
    cmd(8'h0F, 0);
    chk(pause, "PAUSE");
    block();
    repeat (100) @(negedge clk);
    chk(n_ssu == 3, "no scoring while paused");
    block();
    chk(n_overrun == 1, "overrun counted");
    cmd(8'h10, 0);
    chk(!pause, "RESUME");
    repeat (300) @(negedge clk);
    chk(n_ssu == 4 && n_vu == 8, "scoring resumed");
    // lattice read: 3 entries stored, ask for 5
    for (int i = 0; i < 3; i++) latq.push_back(lattice_t'({$urandom, $urandom, $urandom, $urandom}));
    begin
      lattice_t exp_e [3];
      logic [7:0] got[$];
      for (int i = 0; i < 3; i++) exp_e[i] = latq[i];
      byte_in(8'h0C); byte_in(8'd5);
      repeat (3) @(negedge clk);
      chk(tx_mode, "READ_LATTICE response mode");
      for (int i = 0; i < 1 + 3 * LAT_BYTES; i++) begin
        got.push_back(tx_data);
        @(negedge clk); tx_take = 1; @(negedge clk); tx_take = 0;
        repeat (3) @(negedge clk);
      end
      end_frame();
      chk(got[0] == 8'd3, "lattice count byte");
      for (int i = 0; i < 3; i++) begin
        logic [LAT_W-1:0] v;
        for (int k = 0; k < LAT_BYTES; k++) v[LAT_W-1-8*k -: 8] = got[1 + i * LAT_BYTES + k];
        chk(v == exp_e[i], $sformatf("lattice entry %0d bytes %h exp %h", i, v, exp_e[i]));
      end
      chk(latq.size() == 0 && !tx_mode, "lattice drained");
    end
    chk(sched_bad == 0, "scheduling order");
    cmd(8'h0D, 32'd2);
    chk(n_utt == 2 && lat_clear == 0, "second utterance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
