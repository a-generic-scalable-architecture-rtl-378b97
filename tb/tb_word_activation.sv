// Self-checking test of word_activation. Random sorted old active lists and
// up to 16 exited-word slots, each with a sorted bigram successor list, are
// merged under random output back-pressure. A reference merge written here
// gives the expected output list: old entries pass in order (bypass), a
// first-HMM old entry whose (word, predecessor) matches a slot's successor
// takes the better entry score (modify), unmatched successors are inserted
// in word order after the old entries of that word, lower slot first, and
// inserts beyond max_n_best first-HMM entries per word are dropped. Checks
// the output list, the counters, and that every mechanism occurred.
module tb_word_activation;
  import asr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, old_valid, old_done, old_take, out_valid, out_take = 0, done;
  logic [15:0] frame_no = 0;
  logic [7:0]  max_n_best = 3;
  al_entry_t   old_entry, out_entry;
  logic        slot_valid [16];
  logic [15:0] slot_word [16];
  score_t      slot_score [16];
  logic [15:0] bg_dest [16][14];
  score_t      bg_prob [16][14];
  logic [4:0]  bg_n [16];
  logic [31:0] n_bypass, n_modify, n_insert, n_capped;
  int checks = 0, failures = 0, cyc = 0;
  al_entry_t old_q[$], exp_q[$], got_q[$];
  int oi = 0;
  int e_mod, e_ins, e_cap, e_byp;

  always #5 clk = ~clk;
  // Reset goes high then low at 1 ns, so the asynchronous reset clears every
  // register before the first clock edge, whatever its power-up value.
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end
  always @(posedge clk) cyc <= cyc + 1;
  word_activation dut (.*);

  assign old_valid = oi < old_q.size();
  assign old_entry = old_valid ? old_q[oi] : '0;
  assign old_done  = oi >= old_q.size();

  task automatic make_case(int nslots, int nold);
    int words[$];
    old_q.delete(); exp_q.delete();
    for (int l = 0; l < 16; l++) begin
      slot_valid[l] = l < nslots; slot_word[l] = 16'(100 + 3 * l);
      slot_score[l] = -score_t'($urandom_range(0, 5000));
      bg_n[l] = 5'($urandom_range(0, 14));
      begin
        int d;
        d = $urandom_range(0, 3);
        for (int k = 0; k < 14; k++) begin
          bg_dest[l][k] = 16'(d); bg_prob[l][k] = -score_t'($urandom_range(0, 3000));
          d += $urandom_range(1, 4);
        end
      end
    end
    // old list: sorted by word, unique (word, pred, hmm)
    begin
      int w;
      w = 0;
      for (int i = 0; i < nold; i++) begin
        al_entry_t e;
        w += $urandom_range(0, 2);
        e = '0;
        e.word = 16'(w); e.hmm = 4'($urandom_range(0, 2));
        e.pred = ($urandom_range(0, 1) == 1) ? 16'(100 + 3 * $urandom_range(0, 15)) : 16'(7);
        e.in_score = -score_t'($urandom_range(0, 8000)); e.st0 = -score_t'(i);
        if (old_q.size() > 0 && old_q[$].word == e.word) e.hmm = old_q[$].hmm + 1'b1;
        old_q.push_back(e);
      end
    end
    // reference merge
    e_mod = 0; e_ins = 0; e_cap = 0; e_byp = 0;
    begin
      bit used [16][14];
      int maxw;
      for (int l = 0; l < 16; l++) for (int k = 0; k < 14; k++) used[l][k] = 0;
      maxw = 80;
      for (int w = 0; w <= maxw; w++) begin
        int cnt;
        cnt = 0;
        foreach (old_q[i]) if (old_q[i].word == 16'(w)) begin
          al_entry_t e; bit m;
          e = old_q[i]; m = 0;
          if (e.hmm == 0)
            for (int l = 0; l < nslots; l++)
              for (int k = 0; k < int'(bg_n[l]); k++)
                if (bg_dest[l][k] == 16'(w) && slot_word[l] == e.pred) begin
                  score_t s;
                  s = sadd(slot_score[l], bg_prob[l][k]);
                  if (s > e.in_score) e.in_score = s;
                  used[l][k] = 1; m = 1;
                end
          if (m) e_mod++; else e_byp++;
          if (e.hmm == 0) cnt++;
          exp_q.push_back(e);
        end
        for (int l = 0; l < nslots; l++)
          for (int k = 0; k < int'(bg_n[l]); k++)
            if (bg_dest[l][k] == 16'(w) && !used[l][k]) begin
              if (cnt >= int'(max_n_best)) e_cap++;
              else begin
                al_entry_t e;
                e = '0; e.word = 16'(w); e.pred = slot_word[l]; e.hmm = 0;
                e.start_frame = frame_no; e.hmm_start = frame_no;
                e.in_score = sadd(slot_score[l], bg_prob[l][k]);
                e.st0 = NEG_INF; e.st1 = NEG_INF; e.st2 = NEG_INF;
                exp_q.push_back(e); cnt++; e_ins++;
              end
            end
      end
    end
  endtask

  task automatic run_case(int nslots, int nold);
    int t0;
    logic [31:0] b0, m0, i0, c0;
    make_case(nslots, nold);
    b0 = n_bypass; m0 = n_modify; i0 = n_insert; c0 = n_capped;
    got_q.delete(); oi = 0;
    @(negedge clk); start = 1; frame_no = frame_no + 1; @(negedge clk); start = 0;
    t0 = cyc;
    // frame_no changed after make_case: fix expected insert frames
    foreach (exp_q[i]) if (exp_q[i].st0 == NEG_INF) begin exp_q[i].start_frame = frame_no; exp_q[i].hmm_start = frame_no; end
    while (!done && cyc - t0 < 5000) begin
      out_take = $urandom_range(0, 3) != 0;
      #1;
      if (out_valid && out_take) got_q.push_back(out_entry);
      begin
        bit tk;
        tk = old_take;
        @(posedge clk);
        #1 if (tk) oi++;
      end
      @(negedge clk);
    end
    out_take = 0;
    checks++;
    if (got_q.size() != exp_q.size()) begin failures++; $display("FAIL length %0d exp %0d", got_q.size(), exp_q.size()); end
    for (int i = 0; i < got_q.size() && i < exp_q.size(); i++) begin
      checks++;
      if (got_q[i] != exp_q[i]) begin
        failures++;
        $display("FAIL entry %0d: got w%0d p%0d h%0d s%0d exp w%0d p%0d h%0d s%0d", i, got_q[i].word, got_q[i].pred,
                 got_q[i].hmm, got_q[i].in_score, exp_q[i].word, exp_q[i].pred, exp_q[i].hmm, exp_q[i].in_score);
      end
    end
    checks++;
    if (n_bypass - b0 != e_byp || n_modify - m0 != e_mod || n_insert - i0 != e_ins || n_capped - c0 != e_cap) begin
      failures++; $display("FAIL counters byp %0d/%0d mod %0d/%0d ins %0d/%0d cap %0d/%0d", n_bypass - b0, e_byp,
                           n_modify - m0, e_mod, n_insert - i0, e_ins, n_capped - c0, e_cap);
    end
  endtask

  initial begin
    for (int l = 0; l < 16; l++) begin slot_valid[l] = 0; slot_word[l] = 0; slot_score[l] = 0; bg_n[l] = 0;
      for (int k = 0; k < 14; k++) begin bg_dest[l][k] = 0; bg_prob[l][k] = 0; end end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(0, 20);      // no exits: pure bypass
    run_case(3, 0);       // empty old list: pure inserts
    for (int i = 0; i < 40; i++) run_case($urandom_range(1, 16), $urandom_range(0, 60));
    checks++;
    if (n_bypass == 0 || n_modify == 0 || n_insert == 0 || n_capped == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("bypass %0d modify %0d insert %0d capped %0d", n_bypass, n_modify, n_insert, n_capped);
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
