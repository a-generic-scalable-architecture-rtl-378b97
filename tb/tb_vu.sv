// Self-checking test of the Viterbi unit with behavioural flash and DRAM
// models and a senone score SRAM model.
//
// Part A (exact): a one-word language model (start word 0 -> word 1, word 1
// made of two 3-state HMMs) with wide beams. The lattice entries of word 1
// over 10 frames are compared with a Viterbi recursion (Eq. 2.7) computed
// here: state scores, the one-frame delay of the HMM-to-HMM transition, word
// start frame and end frame.
//
// Part B (random): 30 words of 1-3 HMMs from a pool of 20, random bigram rows,
// narrow pruning limits, random senone scores and a lattice that is
// randomly full. Checks for every frame: it finishes; the active list written
// to DRAM is sorted by word with unique (word, predecessor, HMM) keys and
// valid HMM positions; no lattice write is issued while the lattice is full;
// every lattice word's predecessor is the start word (start frame 0) or a
// word that ended in the frame before it started. All mechanisms must occur:
// pruning, propagation, merge, cache hit, bigram modify and insert, N-best
// cap and lattice-full stall.
module tb_vu;
  import asr_pkg::*;
  localparam int WL = 65536, HL = 65536, AL = 65536;
  logic clk = 0, rst_n = 0, utt_start = 0, pause = 0, frame_start = 0, bank = 0, fidx = 0, frame_done;
  logic [15:0] frame_no = 0;
  cfg_t cfg;
  logic sr_rd, sr_bank, sr_frame;
  logic [12:0] sr_addr;
  score_t sr_data = 0;
  logic fl_req, fl_rvalid, dr_req, dr_we, dr_rvalid, lat_wr, lat_full = 0;
  logic [31:0] fl_addr, dr_addr;
  logic [255:0] fl_rdata;
  al_entry_t dr_wdata, dr_rdata;
  lattice_t lat_entry;
  logic [31:0] n_active, n_words, al_len, n_stall, n_pruned, n_propagated, n_merged, n_cache_hits,
               n_cache_misses, n_modify, n_insert, n_capped, n_dram_pages;
  score_t hmm_thr, word_thr;
  int checks = 0, failures = 0, cyc = 0;
  score_t sen_mem [int];
  lattice_t lat_q[$];
  logic lat_full_d = 0;
  int bad_wr = 0;
  int nh [int];   // HMMs per word

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;

  vu dut (.*);
  nor_flash_model #(.W(256), .LAT(8)) fl (.clk, .req(fl_req), .addr(fl_addr), .rvalid(fl_rvalid), .rdata(fl_rdata));
  dram_model #(.LAT(6)) dr (.clk, .req(dr_req), .we(dr_we), .addr(dr_addr), .wdata(dr_wdata), .rvalid(dr_rvalid), .rdata(dr_rdata));

  always @(posedge clk) begin
    if (sr_rd) begin
      int k;
      k = {sr_bank, sr_frame, 16'(sr_addr)};
      sr_data <= sen_mem.exists(k) ? sen_mem[k] : -score_t'(5000);
    end
    lat_full_d <= lat_full;
  end
  always @(negedge clk) if (lat_wr) begin
    lat_q.push_back(lat_entry);
    if (lat_full_d && lat_full) bad_wr++;
  end

  function automatic longint radd(longint a, longint b);
    if (a <= -(longint'(1) << 30) || b <= -(longint'(1) << 30)) return -(longint'(1) << 30);
    return a + b;
  endfunction
  function automatic longint rmax(longint a, longint b);
    return (a > b) ? a : b;
  endfunction

  task automatic word_line(int w, int n, int h []);
    logic [255:0] l;
    l = '0; l[15:0] = 16'(w); l[23:16] = 8'(n);
    for (int k = 0; k < n; k++) l[32 + 16*k +: 16] = 16'(h[k]);
    fl.mem[w] = l;
    nh[w] = n;
  endtask
  task automatic hmm_line(int h, int sen [3], int tin [3], int tself [3]);
    logic [255:0] l;
    l = '0;
    for (int s = 0; s < 3; s++) begin
      l[48*s +: 16] = 16'(sen[s]); l[48*s+16 +: 16] = 16'(tin[s]); l[48*s+32 +: 16] = 16'(tself[s]);
    end
    fl.mem[WL + h] = l;
  endtask
  task automatic bigram_row(int w, int dest[$], int prob[$]);
    for (int k = 0; k < 2; k++) begin
      logic [255:0] l;
      l = '1;
      for (int j = 0; j < 7; j++)
        if (k * 7 + j < dest.size()) l[32*j +: 32] = {16'(prob[k * 7 + j]), 16'(dest[k * 7 + j])};
      fl.mem[WL + HL + 2 * w + k] = l;
    end
  endtask

  task automatic run_frame(int t, int limit);
    int t0;
    @(negedge clk);
    frame_start = 1; bank = 1'((t / 2) % 2); fidx = 1'(t % 2); frame_no = 16'(t);
    @(negedge clk); frame_start = 0;
    t0 = cyc;
    while (!frame_done && cyc - t0 < limit) @(negedge clk);
    checks++;
    if (!frame_done) begin failures++; $display("FAIL frame %0d did not finish", t); end
  endtask

  task automatic utt();
    lat_q.delete();
    @(negedge clk); utt_start = 1; @(negedge clk); utt_start = 0;
  endtask

  // ---------------- part A ----------------
  task automatic part_a();
    int tin [2][3], tself [2][3], sa [2][3];
    longint S [2][3], N [2][3], inA, inB;
    lattice_t exp_q[$];
    int dq[$], pq[$];
    fl.mem.delete(); sen_mem.delete(); nh.delete();
    word_line(0, 1, '{5});
    word_line(1, 2, '{1, 2});
    for (int h = 0; h < 2; h++) begin
      for (int s = 0; s < 3; s++) begin
        sa[h][s] = 10 + 3 * h + s; tin[h][s] = -$urandom_range(0, 500); tself[h][s] = -$urandom_range(0, 500);
      end
      hmm_line(h + 1, sa[h], tin[h], tself[h]);
    end
    dq.push_back(1); pq.push_back(-100);
    bigram_row(0, dq, pq);
    dq.delete(); pq.delete();
    bigram_row(1, dq, pq);
    cfg = '0;
    cfg.hmm_beam = 100000000; cfg.word_beam = 100000000; cfg.maxhmmpf = 30000; cfg.maxwpf = 20; cfg.max_n_best = 10;
    utt();
    for (int h = 0; h < 2; h++) for (int s = 0; s < 3; s++) S[h][s] = -(longint'(1) << 30);
    inA = -100; inB = -(longint'(1) << 30);
    for (int t = 0; t < 10; t++) begin
      longint sen [2][3];
      for (int h = 0; h < 2; h++) for (int s = 0; s < 3; s++) begin
        sen[h][s] = -$urandom_range(0, 3000);
        sen_mem[{1'((t / 2) % 2), 1'(t % 2), 16'(sa[h][s])}] = score_t'(sen[h][s]);
      end
      for (int h = 0; h < 2; h++) begin
        longint inp;
        inp = h == 0 ? inA : inB;
        N[h][0] = radd(rmax(radd(S[h][0], tself[h][0]), radd(inp, tin[h][0])), sen[h][0]);
        N[h][1] = radd(rmax(radd(S[h][1], tself[h][1]), radd(S[h][0], tin[h][1])), sen[h][1]);
        N[h][2] = radd(rmax(radd(S[h][2], tself[h][2]), radd(S[h][1], tin[h][2])), sen[h][2]);
      end
      inA = -(longint'(1) << 30);
      inB = N[0][2];
      S = N;
      if (N[1][2] > -(longint'(1) << 30)) begin
        lattice_t x;
        x = '0; x.word = 1; x.pred = 0; x.score = score_t'(N[1][2]); x.start_frame = 0; x.last_end = 16'(t);
        exp_q.push_back(x);
      end
      run_frame(t, 20000);
    end
    checks++;
    if (lat_q.size() != exp_q.size()) begin failures++; $display("FAIL A: %0d lattice entries, expected %0d", lat_q.size(), exp_q.size()); end
    for (int i = 0; i < lat_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (lat_q[i].word != exp_q[i].word || lat_q[i].pred != exp_q[i].pred || lat_q[i].score != exp_q[i].score ||
          lat_q[i].start_frame != exp_q[i].start_frame || lat_q[i].last_end != exp_q[i].last_end) begin
        failures++;
        $display("FAIL A entry %0d: w%0d p%0d s%0d f%0d-%0d exp w%0d s%0d end %0d", i, lat_q[i].word, lat_q[i].pred,
                 lat_q[i].score, lat_q[i].start_frame, lat_q[i].last_end, exp_q[i].word, exp_q[i].score, exp_q[i].last_end);
      end
    end
    $display("part A: %0d lattice entries", lat_q.size());
  endtask

  // ---------------- part B ----------------
  task automatic check_list(int t);
    int base, n;
    al_entry_t prev;
    base = (t % 2 == 0) ? AL : 0;
    n = al_len;
    for (int i = 0; i < n; i++) begin
      al_entry_t e;
      e = dr.mem[base + i];
      checks++;
      if (int'(e.hmm) >= nh[e.word] || (i > 0 && (e.word < prev.word ||
          (e.word == prev.word && e.pred == prev.pred && e.hmm == prev.hmm)))) begin
        failures++; $display("FAIL B frame %0d list entry %0d: w%0d p%0d h%0d", t, i, e.word, e.pred, e.hmm);
      end
      for (int j = 0; j < i; j++) begin
        al_entry_t o;
        o = dr.mem[base + j];
        if (o.word == e.word && o.pred == e.pred && o.hmm == e.hmm) begin
          failures++; $display("FAIL B frame %0d duplicate key w%0d p%0d h%0d", t, e.word, e.pred, e.hmm);
        end
      end
      prev = e;
    end
  endtask

  task automatic part_b();
    fl.mem.delete(); sen_mem.delete(); nh.delete();
    for (int h = 0; h < 20; h++) begin
      int sa [3], ti [3], ts [3];
      for (int s = 0; s < 3; s++) begin sa[s] = $urandom_range(0, 199); ti[s] = -$urandom_range(0, 800); ts[s] = -$urandom_range(0, 800); end
      hmm_line(h, sa, ti, ts);
    end
    for (int w = 0; w < 30; w++) begin
      int n; int h [];
      int dq[$], pq[$];
      n = (w == 0) ? 1 : $urandom_range(1, 3);
      h = new[n];
      for (int k = 0; k < n; k++) h[k] = $urandom_range(0, 19);
      word_line(w, n, h);
      for (int d = 1; d < 30; d++) if ($urandom_range(0, 2) == 0 && dq.size() < 14) begin dq.push_back(d); pq.push_back(-$urandom_range(0, 2000)); end
      bigram_row(w, dq, pq);
    end
    cfg = '0;
    cfg.hmm_beam = 6000; cfg.word_beam = 4000; cfg.maxhmmpf = 40; cfg.maxwpf = 6; cfg.max_n_best = 2;
    utt();
    for (int t = 0; t < 24; t++) begin
      for (int s = 0; s < 200; s++) sen_mem[{1'((t / 2) % 2), 1'(t % 2), 16'(s)}] = -score_t'($urandom_range(0, 3000));
      fork
        run_frame(t, 200000);
        begin
          // lattice randomly full for a while during the frame
          repeat ($urandom_range(20, 300)) @(negedge clk);
          lat_full = 1;
          repeat ($urandom_range(5, 200)) @(negedge clk);
          lat_full = 0;
        end
      join
      check_list(t);
    end
    checks++;
    if (bad_wr != 0) begin failures++; $display("FAIL B: %0d lattice writes while full", bad_wr); end
    foreach (lat_q[i]) begin
      bit ok;
      ok = lat_q[i].start_frame == 0 ? lat_q[i].pred == 0 : 0;
      if (lat_q[i].start_frame != 0)
        foreach (lat_q[j]) if (lat_q[j].word == lat_q[i].pred && lat_q[j].last_end + 1 == lat_q[i].start_frame) ok = 1;
      checks++;
      if (!ok) begin failures++; $display("FAIL B lattice w%0d p%0d start %0d has no predecessor exit", lat_q[i].word, lat_q[i].pred, lat_q[i].start_frame); end
    end
    $display("part B: lattice %0d, pruned %0d propagated %0d merged %0d hits %0d misses %0d modify %0d insert %0d capped %0d stall %0d pages %0d",
             lat_q.size(), n_pruned, n_propagated, n_merged, n_cache_hits, n_cache_misses, n_modify, n_insert, n_capped, n_stall, n_dram_pages);
    checks++;
    if (lat_q.size() == 0 || n_pruned == 0 || n_propagated == 0 || n_merged == 0 || n_cache_hits == 0 ||
        n_modify == 0 || n_insert == 0 || n_capped == 0 || n_stall == 0) begin
      failures++; $display("FAIL B: a mechanism never happened");
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    part_a();
    part_b();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
