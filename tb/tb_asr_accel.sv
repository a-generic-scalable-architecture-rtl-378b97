// End-to-end test of the accelerator top level at its default (paper-size)
// parameters: 8000-senone score SRAM, 1024-entry lattice, 16 exit slots,
// 65536-entry active list regions. Behavioural models stand in for the
// acoustic-model flash (768-bit lines), the language-model flash (256-bit
// lines) and the active-list DRAM; the host CPU is the testbench's quad-SPI
// master, which uses nothing but the command set.
//
// Flow: INIT (log-add table load), SET_* configuration, SET_UTTERANCE_ID,
// then 26 LOAD_FEATURE_BLOCK commands (52 frames) of random features, with a
// PAUSE/RESUME window during which a second block is sent too early (a
// feature overrun, dropped by the accelerator). Lattice entries are read
// with READ_LATTICE whenever the Viterbi unit stalls on a full lattice, and
// at the end until empty.
//
// Checks: every accepted block is scored and both of its frames decoded; no
// scoring progress while paused; the last block's senone scores (from the
// score SRAM) match the reference scorer of acoustic_lib.svh; every lattice
// entry read over SPI is well formed (known word, end not before start,
// predecessor is the start word at frame 0 or a word that ended in the
// frame before the word started); the number of entries read equals the
// number written. Every mechanism must have happened at least once: HMM
// pruning, HMM-to-HMM propagation, output merge, HMM cache hit and miss,
// bigram modify, insert and bypass, N-best cap, lattice-full stall, DRAM
// page traffic, pause and feature overrun; the run fails otherwise.
// A second utterance with a one-word language model at another flash offset
// is then checked exactly: its lattice scores and end frames must equal a
// Viterbi recursion over reference senone scores of the features sent.
module tb_asr_accel;
  import asr_pkg::*;
  `include "acoustic_lib.svh"
  localparam int NS = 120, FL = 39, NW = 30, NBLK = 26;
  localparam int WL = 65536, HL = 65536;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1;
  logic [3:0] io_in = 0, io_out, io_oe;
  logic af_req, af_rvalid, vf_req, vf_rvalid, dr_req, dr_we, dr_rvalid, busy;
  logic [31:0] af_addr, vf_addr, dr_addr;
  logic [767:0] af_rdata;
  logic [255:0] vf_rdata;
  al_entry_t dr_wdata, dr_rdata;
  stats_t stats;
  int checks = 0, failures = 0, cyc = 0;
  sen_t lib [NS];
  shortint fv [2][MAXD];
  lattice_t lat[$];
  int n_lat_writes = 0, nh [int];

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;

  asr_accel dut (.*);
  nor_flash_model #(.W(768), .LAT(8)) af (.clk, .req(af_req), .addr(af_addr), .rvalid(af_rvalid), .rdata(af_rdata));
  nor_flash_model #(.W(256), .LAT(8)) vf (.clk, .req(vf_req), .addr(vf_addr), .rvalid(vf_rvalid), .rdata(vf_rdata));
  dram_model #(.LAT(6)) dr (.clk, .req(dr_req), .we(dr_we), .addr(dr_addr), .wdata(dr_wdata), .rvalid(dr_rvalid), .rdata(dr_rdata));
  `include "spi_master.svh"

  always @(posedge clk) if (dut.lat_wr && !dut.lat_full) n_lat_writes++;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- memory images ----------------
  task automatic build_flash();
    int unsigned w[$];
    make_table();
    for (int l = 0; l < 86; l++) begin
      logic [767:0] line;
      for (int j = 0; j < 48; j++) line[16*j +: 16] = (l * 48 + j < 4096) ? 16'(lb_tbl[l * 48 + j]) : 16'd0;
      af.mem[l] = line;
    end
    w.push_back(NS);
    for (int s = 0; s < NS; s++) begin
      lib[s] = rand_senone(s, $urandom_range(1, 3), FL);
      senone_words(lib[s], FL, w);
    end
    for (int i = 0; i < w.size(); i += 24) begin
      logic [767:0] line;
      line = '0;
      for (int j = 0; j < 24 && i + j < w.size(); j++) line[32*j +: 32] = w[i + j];
      af.mem[128 + i / 24] = line;
    end
    // language model at line 0: words, HMMs, bigram rows
    for (int h = 0; h < 20; h++) begin
      logic [255:0] l;
      l = '0;
      for (int s = 0; s < 3; s++) begin
        l[48*s +: 16] = 16'($urandom_range(0, NS - 1));
        l[48*s+16 +: 16] = 16'(-$urandom_range(0, 600));
        l[48*s+32 +: 16] = 16'(-$urandom_range(0, 600));
      end
      vf.mem[WL + h] = l;
    end
    for (int wd = 0; wd < NW; wd++) begin
      logic [255:0] l;
      int n, nd;
      n = (wd == 0) ? 1 : $urandom_range(1, 3);
      nh[wd] = n;
      l = '0; l[15:0] = 16'(wd); l[23:16] = 8'(n);
      for (int k = 0; k < n; k++) l[32 + 16*k +: 16] = 16'($urandom_range(0, 19));
      vf.mem[wd] = l;
      nd = 0;
      for (int k = 0; k < 2; k++) vf.mem[WL + HL + 2 * wd + k] = '1;
      for (int d = 1; d < NW && nd < 14; d++)
        if ($urandom_range(0, 1) == 0) begin
          logic [255:0] b;
          b = vf.mem[WL + HL + 2 * wd + nd / 7];
          b[32*(nd % 7) +: 32] = {16'(-$urandom_range(0, 1500)), 16'(d)};
          vf.mem[WL + HL + 2 * wd + nd / 7] = b;
          nd++;
        end
    end
  endtask

  // ---------------- host side ----------------
  task automatic send_block();
    spi_begin();
    spi_byte(8'h0B);
    for (int f = 0; f < 2; f++)
      for (int d = 0; d < FL; d++) begin
        fv[f][d] = shortint'($urandom_range(0, 600)) - 300;
        spi_byte(fv[f][d][15:8]); spi_byte(fv[f][d][7:0]);
      end
    spi_end();
  endtask

  // read up to 255 entries; returns how many came
  task automatic read_lattice(output int n);
    logic [7:0] b;
    spi_begin();
    spi_byte(8'h0C); spi_byte(8'd255);
    repeat (4 * SPI_H) @(negedge clk);
    spi_read_byte(b);
    n = b;
    for (int i = 0; i < n; i++) begin
      logic [LAT_W-1:0] v;
      for (int k = 0; k < LAT_BYTES; k++) begin spi_read_byte(b); v[LAT_W-1-8*k -: 8] = b; end
      lat.push_back(lattice_t'(v));
    end
    spi_end();
  endtask

  // wait until `target` blocks were scored, draining the lattice on stalls
  task automatic wait_scored(int target);
    int t0, n;
    logic [31:0] st0;
    t0 = cyc;
    st0 = stats.stall_cycles;
    while (int'(stats.blocks_scored) < target && cyc - t0 < 3000000) begin
      repeat (500) @(negedge clk);
      if (stats.stall_cycles != st0) begin read_lattice(n); st0 = stats.stall_cycles; end
    end
  endtask

  // Utterance 2: one-word language model (start word 0 -> word 1 of two
  // 3-state HMMs on senones 0..5) at another flash offset, wide beams. The
  // lattice read over SPI must equal a Viterbi recursion (Eq. 2.7) over the
  // reference senone scores of the features sent.
  localparam int LM2 = 200000;
  task automatic utterance2();
    int tin [2][3], tself [2][3], n, sb, fb;
    longint S [2][3], N [2][3], inA, inB, sen [2][3];
    lattice_t exp_q[$];
    logic [255:0] l;
    lat.delete();
    l = '0; l[23:16] = 8'd1; l[47:32] = 16'd0;               vf.mem[LM2 + 0] = l;
    l = '0; l[15:0] = 16'd1; l[23:16] = 8'd2; l[47:32] = 16'd1; l[63:48] = 16'd2; vf.mem[LM2 + 1] = l;
    for (int h = 0; h < 2; h++) begin
      l = '0;
      for (int st = 0; st < 3; st++) begin
        tin[h][st] = -$urandom_range(0, 600); tself[h][st] = -$urandom_range(0, 600);
        l[48*st +: 16] = 16'(3 * h + st); l[48*st+16 +: 16] = 16'(tin[h][st]); l[48*st+32 +: 16] = 16'(tself[h][st]);
      end
      vf.mem[LM2 + WL + 1 + h] = l;
    end
    l = '1; l[31:0] = {16'(-16'sd100), 16'd1};   vf.mem[LM2 + WL + HL + 0] = l;
    l = '1;                                      vf.mem[LM2 + WL + HL + 1] = l;
    vf.mem[LM2 + WL + HL + 2] = '1; vf.mem[LM2 + WL + HL + 3] = '1;
    spi_cmd(8'h02, LM2);
    spi_cmd(8'h03, 32'd100000000);
    spi_cmd(8'h04, 32'd100000000);
    spi_cmd(8'h0D, 32'd2);
    sb = stats.blocks_scored; fb = stats.frames_decoded;    // counters run on across utterances
    for (int h = 0; h < 2; h++) for (int st = 0; st < 3; st++) S[h][st] = -(longint'(1) << 30);
    inA = -100; inB = -(longint'(1) << 30);
    for (int b = 0; b < 5; b++) begin
      send_block();
      for (int f = 0; f < 2; f++) begin
        for (int h = 0; h < 2; h++) for (int st = 0; st < 3; st++) sen[h][st] = ref_senone(lib[3 * h + st], fv[f], FL);
        for (int h = 0; h < 2; h++) begin
          longint inp;
          inp = h == 0 ? inA : inB;
          N[h][0] = radd(rmax(radd(S[h][0], tself[h][0]), radd(inp, tin[h][0])), sen[h][0]);
          N[h][1] = radd(rmax(radd(S[h][1], tself[h][1]), radd(S[h][0], tin[h][1])), sen[h][1]);
          N[h][2] = radd(rmax(radd(S[h][2], tself[h][2]), radd(S[h][1], tin[h][2])), sen[h][2]);
        end
        inA = -(longint'(1) << 30); inB = N[0][2]; S = N;
        if (N[1][2] > -(longint'(1) << 30)) begin
          lattice_t x;
          x = '0; x.word = 1; x.pred = 0; x.score = score_t'(N[1][2]); x.last_end = 16'(2 * b + f);
          exp_q.push_back(x);
        end
      end
      wait_scored(sb + b + 1);
    end
    while (int'(stats.frames_decoded) < fb + 10) @(negedge clk);
    read_lattice(n);
    chk(lat.size() == exp_q.size(), $sformatf("utterance 2: %0d lattice entries, expected %0d", lat.size(), exp_q.size()));
    for (int i = 0; i < lat.size() && i < exp_q.size(); i++)
      chk(lat[i].word == 1 && lat[i].pred == 0 && lat[i].score == exp_q[i].score && lat[i].start_frame == 0 &&
          lat[i].last_end == exp_q[i].last_end,
          $sformatf("utterance 2 entry %0d: score %0d exp %0d end %0d exp %0d", i, lat[i].score, exp_q[i].score,
                    lat[i].last_end, exp_q[i].last_end));
  endtask

  function automatic longint radd(longint a, longint b);
    if (a <= -(longint'(1) << 30) || b <= -(longint'(1) << 30)) return -(longint'(1) << 30);
    return a + b;
  endfunction
  function automatic longint rmax(longint a, longint b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    int n, t0, accepted;
    logic [31:0] sc0;
    build_flash();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    spi_begin(); spi_byte(8'h0E); spi_end();                 // INIT
    t0 = cyc;
    while (busy && cyc - t0 < 100000) @(negedge clk);
    chk(!busy, "INIT finished");
    spi_cmd(8'h03, 32'd4000000);  // HMM beam
    spi_cmd(8'h04, 32'd3000000);  // word beam
    spi_cmd(8'h05, 32'd60);       // maxhmmpf
    spi_cmd(8'h06, 32'd30);       // maxwpf
    spi_cmd(8'h07, 32'd2);        // N-best
    spi_cmd(8'h0D, 32'd1);        // utterance 1
    accepted = 0;
    for (int b = 0; b < NBLK; b++) begin
      if (b == 6) begin
        // pause: the block waits, the next one overruns it
        spi_cmd(8'h0F, 0);
        wait_scored(accepted);
        repeat (20000) @(negedge clk);
        sc0 = stats.blocks_scored;
        send_block(); accepted++;
        repeat (5000) @(negedge clk);
        send_block();
        chk(stats.blocks_scored == sc0 && stats.feature_overrun == 1, "pause holds scoring, overrun counted");
        spi_cmd(8'h10, 0);
      end else begin
        send_block(); accepted++;
      end
      // the next block may only be sent once this one has left the feature
      // buffer; waiting for its score is the host's simple way to know
      wait_scored(accepted);
    end
    wait_scored(accepted);
    // drain
    t0 = cyc;
    while ((busy || int'(stats.frames_decoded) < 2 * accepted) && cyc - t0 < 5000000) begin
      repeat (500) @(negedge clk);
      if (stats.stall_cycles != 0) begin read_lattice(n); end
    end
    do read_lattice(n); while (n != 0);
    chk(int'(stats.blocks_scored) == accepted && int'(stats.frames_decoded) == 2 * accepted,
        $sformatf("all blocks decoded: %0d scored, %0d frames, %0d accepted", stats.blocks_scored, stats.frames_decoded, accepted));
    // last block's senone scores
    for (int s = 0; s < NS; s += 7)
      for (int f = 0; f < 2; f++) begin
        score_t got;
        got = dut.u_sram.mem[(((accepted - 1) % 2) * 2 + f) * 8000 + s];
        chk(longint'(got) == ref_senone(lib[s], fv[f], FL), $sformatf("senone %0d frame %0d score %0d", s, f, got));
      end
    // lattice consistency
    chk(lat.size() == n_lat_writes && lat.size() > 0, $sformatf("lattice entries read %0d written %0d", lat.size(), n_lat_writes));
    foreach (lat[i]) begin
      bit ok;
      ok = lat[i].word < NW && lat[i].last_end >= lat[i].start_frame && lat[i].last_end >= lat[i].last_start;
      if (lat[i].start_frame == 0) ok = ok && lat[i].pred == 0;
      else begin
        bit found;
        found = 0;
        foreach (lat[j]) if (lat[j].word == lat[i].pred && lat[j].last_end + 1 == lat[i].start_frame) found = 1;
        ok = ok && found;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL lattice entry %0d: w%0d p%0d frames %0d..%0d", i, lat[i].word, lat[i].pred, lat[i].start_frame, lat[i].last_end);
      end
    end
    $display("blocks %0d frames %0d lattice %0d | pruned %0d propagated %0d merged %0d hits %0d misses %0d",
             stats.blocks_scored, stats.frames_decoded, lat.size(), stats.pruned, stats.propagated, stats.merged,
             stats.cache_hits, stats.cache_misses);
    $display("modify %0d insert %0d bypass %0d capped %0d stall %0d pages %0d overrun %0d cycles %0d",
             stats.word_modify, stats.word_insert, dut.u_vu.u_wa.n_bypass, stats.nbest_capped, stats.stall_cycles,
             stats.dram_pages, stats.feature_overrun, cyc);
    chk(stats.pruned != 0, "mechanism: pruning");
    chk(stats.propagated != 0, "mechanism: propagation");
    chk(stats.merged != 0, "mechanism: output merge");
    chk(stats.cache_hits != 0 && stats.cache_misses != 0, "mechanism: HMM cache hit and miss");
    chk(stats.word_modify != 0, "mechanism: bigram modify");
    chk(stats.word_insert != 0, "mechanism: bigram insert");
    chk(dut.u_vu.u_wa.n_bypass != 0, "mechanism: bypass");
    chk(stats.nbest_capped != 0, "mechanism: N-best cap");
    chk(stats.stall_cycles != 0, "mechanism: lattice-full stall");
    chk(stats.dram_pages != 0, "mechanism: DRAM pages");
    chk(stats.feature_overrun == 1, "mechanism: feature overrun");
    utterance2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #600000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
