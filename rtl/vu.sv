// Viterbi Unit (VU): first decode pass, word dependent N-best Viterbi beam
// search with a bigram language model.
//
// One frame (frame_start .. frame_done):
//  1. Prefetch: the bigram rows of the words that exited into the lattice in
//     the last frame (the slots) are read from flash into the prefetch buffer.
//  2. Stream: the old active list is read from DRAM in word order and passed
//     through word_activation, which adds the new word entries. For every
//     entry the word line (once per word) and the HMM line (through the HMM
//     cache) are fetched, the three senone scores of the frame are read from
//     the senone score SRAM and three phone_score units compute Eq. 2.7.
//  3. Post: an HMM whose best state is below the HMM threshold is dropped.
//     If its last state passes the HMM threshold, the next HMM of the word is
//     activated with that score as entry score (placed right after it). If it
//     is the last HMM of the word and its last state passes the word
//     threshold, the word goes into the lattice (stalling while the lattice
//     is full) and, up to maxwpf words per frame, into a slot for the next
//     frame. Entries with the same (word, predecessor, HMM) that meet in the
//     output are merged, keeping the better scores; the result is written to
//     DRAM as the next active list.
//  4. End: the two adaptive_pruning units update the HMM and word beams from
//     the number of active HMMs and exits of the frame (Eq. 4.1); the best
//     state score of the frame is the reference for both thresholds.
//
// Entries are handled one at a time by a state machine; the paper's VU is a
// 22-stage pipeline doing the same steps. At utt_start the lists are emptied
// and word 0 (taken as the sentence start word) is placed in slot 0 with
// score 0, so its bigram successors start the search. pause holds the frame
// state machine between entries.
module vu
  import asr_pkg::*;
#(
  parameter int NUM_SENONES = 8000,
  parameter int SLOTS       = 16,
  parameter int BG_LINES    = 2,
  parameter int HMM_CACHE   = 5,
  parameter int PAGE        = 16,
  parameter int AL_MAX      = 65536,
  parameter int WORD_LINES  = 65536,
  parameter int HMM_LINES   = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        utt_start,
  input  logic        pause,
  input  logic        frame_start,
  input  logic        bank,
  input  logic        fidx,
  input  logic [15:0] frame_no,
  output logic        frame_done,
  // senone score SRAM read port
  output logic        sr_rd,
  output logic        sr_bank,
  output logic        sr_frame,
  output logic [$clog2(NUM_SENONES)-1:0] sr_addr,
  input  score_t      sr_data,
  // language model NOR flash
  output logic        fl_req,
  output logic [31:0] fl_addr,
  input  logic        fl_rvalid,
  input  logic [255:0] fl_rdata,
  // active list DRAM
  output logic        dr_req,
  output logic        dr_we,
  output logic [31:0] dr_addr,
  output al_entry_t   dr_wdata,
  input  logic        dr_rvalid,
  input  al_entry_t   dr_rdata,
  // word lattice
  output logic        lat_wr,
  output lattice_t    lat_entry,
  input  logic        lat_full,
  // status
  output logic [31:0] n_active,      // HMMs kept in the last frame
  output logic [31:0] n_words,       // lattice words of the last frame
  output logic [31:0] al_len,        // length of the current active list
  output score_t      hmm_thr,
  output score_t      word_thr,
  output logic [31:0] n_stall,       // cycles stalled on a full lattice
  output logic [31:0] n_pruned,
  output logic [31:0] n_propagated,
  output logic [31:0] n_merged,
  output logic [31:0] n_cache_hits,
  output logic [31:0] n_cache_misses,
  output logic [31:0] n_modify,
  output logic [31:0] n_insert,
  output logic [31:0] n_capped,
  output logic [31:0] n_dram_pages
);
  localparam int BPS = BG_PER_LINE * BG_LINES;
  localparam int SW  = $clog2(SLOTS);
  localparam int SAW = $clog2(NUM_SENONES);

  // ---------------- sub-blocks ----------------
  logic        dc_start, rd_valid, rd_take, rd_done, wr_valid, wr_ready, dc_flush, dc_flushed;
  al_entry_t   rd_entry, wr_entry;
  logic [31:0] wr_count, rd_pages, wr_pages;
  logic        region;   // active list region read this frame
  dram_ctrl #(.PAGE(PAGE)) u_dram (
    .clk, .rst_n, .start(dc_start),
    .rd_base(region ? 32'(AL_MAX) : 32'd0), .rd_count(al_len),
    .wr_base(region ? 32'd0 : 32'(AL_MAX)),
    .rd_valid, .rd_entry, .rd_take, .rd_done,
    .wr_valid, .wr_entry, .wr_ready, .flush(dc_flush), .flushed(dc_flushed), .wr_count,
    .dr_req, .dr_we, .dr_addr, .dr_wdata, .dr_rvalid, .dr_rdata,
    .n_rd_pages(rd_pages), .n_wr_pages(wr_pages));
  assign n_dram_pages = rd_pages + wr_pages;

  logic        fc_req, fc_ack, fc_hit, bg_clear;
  vsel_e       fc_sel;
  logic [15:0] fc_id;
  logic [3:0]  fc_pos;
  logic [SW-1:0] fc_slot;
  logic [255:0]  fc_line;
  logic [15:0]   bg_dest [SLOTS][BPS];
  score_t        bg_prob [SLOTS][BPS];
  logic [4:0]    bg_n    [SLOTS];
  vu_flash_ctrl #(.LINE_W(256), .HMM_CACHE(HMM_CACHE), .SLOTS(SLOTS), .BG_LINES(BG_LINES),
                  .WORD_LINES(WORD_LINES), .HMM_LINES(HMM_LINES)) u_fc (
    .clk, .rst_n, .lm_offset(cfg.lm_offset), .req(fc_req), .sel(fc_sel), .id(fc_id),
    .pos(fc_pos), .slot(fc_slot), .ack(fc_ack), .line(fc_line), .hit(fc_hit),
    .bg_clear, .bg_dest, .bg_prob, .bg_n, .fl_req, .fl_addr, .fl_rvalid, .fl_rdata,
    .n_hits(n_cache_hits), .n_misses(n_cache_misses));

  logic        slot_valid [SLOTS];
  logic [15:0] slot_word  [SLOTS];
  score_t      slot_score [SLOTS];
  logic        wa_start, wa_valid, wa_take, wa_done;
  al_entry_t   wa_entry;
  logic [31:0] n_bypass;
  word_activation #(.SLOTS(SLOTS), .BPS(BPS)) u_wa (
    .clk, .rst_n, .start(wa_start), .frame_no, .max_n_best(cfg.max_n_best),
    .old_valid(rd_valid), .old_entry(rd_entry), .old_done(rd_done), .old_take(rd_take),
    .slot_valid, .slot_word, .slot_score, .bg_dest, .bg_prob, .bg_n,
    .out_valid(wa_valid), .out_entry(wa_entry), .out_take(wa_take), .done(wa_done),
    .n_bypass, .n_modify, .n_insert, .n_capped);

  // ---------------- scoring datapath ----------------
  al_entry_t    e;            // entry being scored
  logic [255:0] word_line, hmm_line;
  score_t       sen [3];
  score_t       ns  [3];
  logic         from_left [3];
  logic [15:0]  cur_word;
  logic         cur_word_v;

  function automatic score_t tp(input logic [15:0] v);
    return score_t'($signed(v));
  endfunction

  phone_score u_ps0 (.own(e.st0), .left(e.in_score), .tp_self(tp(hmm_line[32 +: 16])),
                     .tp_in(tp(hmm_line[16 +: 16])), .senone(sen[0]), .score(ns[0]), .from_left(from_left[0]));
  phone_score u_ps1 (.own(e.st1), .left(e.st0), .tp_self(tp(hmm_line[80 +: 16])),
                     .tp_in(tp(hmm_line[64 +: 16])), .senone(sen[1]), .score(ns[1]), .from_left(from_left[1]));
  phone_score u_ps2 (.own(e.st2), .left(e.st1), .tp_self(tp(hmm_line[128 +: 16])),
                     .tp_in(tp(hmm_line[112 +: 16])), .senone(sen[2]), .score(ns[2]), .from_left(from_left[2]));

  // ---------------- adaptive pruning ----------------
  logic        ap_end;
  score_t      frame_best;
  logic [31:0] cnt_active, cnt_words;
  score_t      hmm_beam, word_beam;
  adaptive_pruning u_aph (.clk, .rst_n, .utt_start, .frame_end(ap_end), .n_active(cnt_active),
    .n_set(cfg.maxhmmpf), .init_beam(cfg.hmm_beam), .best(frame_best), .beam(hmm_beam), .threshold(hmm_thr));
  adaptive_pruning u_apw (.clk, .rst_n, .utt_start, .frame_end(ap_end), .n_active(cnt_words),
    .n_set(cfg.maxwpf), .init_beam(cfg.word_beam), .best(frame_best), .beam(word_beam), .threshold(word_thr));

  // ---------------- output merge (held entry) ----------------
  al_entry_t held;
  logic      held_v;

  function automatic logic same_key(input al_entry_t a, input al_entry_t b);
    return a.word == b.word && a.pred == b.pred && a.hmm == b.hmm;
  endfunction

  function automatic al_entry_t merge(input al_entry_t a, input al_entry_t b);
    al_entry_t m;
    logic a_dead;
    a_dead = a.st0 <= NEG_INF && a.st1 <= NEG_INF && a.st2 <= NEG_INF;
    m = a_dead ? b : a;
    m.in_score = smax(a.in_score, b.in_score);
    m.st0 = smax(a.st0, b.st0);
    m.st1 = smax(a.st1, b.st1);
    m.st2 = smax(a.st2, b.st2);
    return m;
  endfunction

  // ---------------- frame state machine ----------------
  typedef enum logic [4:0] {
    F_IDLE, F_PREF, F_PREF_W, F_START, F_GET, F_WORD, F_WORD_W, F_HMM, F_HMM_W,
    F_S0, F_S1, F_S2, F_S3, F_SCORE, F_POST, F_PROP, F_FLUSH, F_FLUSH_W, F_END
  } fstate_e;
  fstate_e st;

  logic [SW:0]  pslot;                 // prefetch slot counter
  logic         nxt_valid [SLOTS];     // slots being filled for the next frame
  logic [15:0]  nxt_word  [SLOTS];
  score_t       nxt_score [SLOTS];
  logic [SW:0]  nxt_cnt;
  al_entry_t    scored, act;
  logic         keep, prop, is_last, lat_done;
  logic [7:0]   num_hmms;

  // push of one entry into the merge register; returns 0 when DRAM write buffer is full
  logic      push_req;
  al_entry_t push_e;
  logic      push_ok;
  always_comb begin
    push_req = 1'b0;
    push_e   = scored;
    if (st == F_POST && !pause && keep && lat_done) push_req = 1'b1;
    if (st == F_PROP && !pause && prop) begin push_req = 1'b1; push_e = act; end
    push_ok  = !held_v || same_key(held, push_e) || wr_ready;
    wr_valid = (push_req && held_v && !same_key(held, push_e)) ||
               (st == F_FLUSH && held_v);
    wr_entry = held;
  end

  assign wa_take = st == F_GET && !pause && wa_valid;
  assign sr_bank = bank;
  assign sr_frame = fidx;

  always_comb begin
    is_last  = 8'(e.hmm) + 8'd1 >= num_hmms;
    scored   = e;
    scored.st0 = ns[0];
    scored.st1 = ns[1];
    scored.st2 = ns[2];
    scored.in_score = NEG_INF;   // consumed; a following activation brings the new one
    act = '0;
    act.word = e.word;
    act.pred = e.pred;
    act.hmm  = e.hmm + 4'd1;
    act.start_frame = e.start_frame;
    act.hmm_start   = frame_no + 16'd1;
    act.in_score    = ns[2];
    act.st0 = NEG_INF; act.st1 = NEG_INF; act.st2 = NEG_INF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; frame_done <= 1'b0; region <= 1'b0; al_len <= '0;
      fc_req <= 1'b0; fc_sel <= SEL_WORD; fc_id <= '0; fc_pos <= '0; fc_slot <= '0;
      bg_clear <= 1'b0; dc_start <= 1'b0; dc_flush <= 1'b0; wa_start <= 1'b0; ap_end <= 1'b0;
      sr_rd <= 1'b0; sr_addr <= '0; lat_wr <= 1'b0; lat_entry <= '0;
      e <= '0; word_line <= '0; hmm_line <= '0; cur_word <= '0; cur_word_v <= 1'b0;
      sen[0] <= '0; sen[1] <= '0; sen[2] <= '0; pslot <= '0; nxt_cnt <= '0;
      frame_best <= NEG_INF; cnt_active <= '0; cnt_words <= '0; n_active <= '0; n_words <= '0;
      held <= '0; held_v <= 1'b0; keep <= 1'b0; prop <= 1'b0; lat_done <= 1'b0; num_hmms <= '0;
      n_stall <= '0; n_pruned <= '0; n_propagated <= '0; n_merged <= '0;
      for (int l = 0; l < SLOTS; l++) begin
        slot_valid[l] <= 1'b0; slot_word[l] <= '0; slot_score[l] <= '0;
        nxt_valid[l]  <= 1'b0; nxt_word[l]  <= '0; nxt_score[l]  <= '0;
      end
    end else begin
      frame_done <= 1'b0; bg_clear <= 1'b0; dc_start <= 1'b0; wa_start <= 1'b0;
      ap_end <= 1'b0; sr_rd <= 1'b0; lat_wr <= 1'b0; dc_flush <= 1'b0;

      // merge register
      if (push_req && push_ok) begin
        if (held_v && same_key(held, push_e)) begin
          held <= merge(held, push_e);
          n_merged <= n_merged + 1;
        end else begin
          held <= push_e;
          held_v <= 1'b1;
        end
      end

      case (st)
        F_IDLE: if (frame_start) begin
          pslot <= '0;
          bg_clear <= 1'b1;
          st <= F_PREF;
        end
        F_PREF: begin
          if (int'(pslot) >= SLOTS) st <= F_START;
          else if (!slot_valid[pslot[SW-1:0]]) pslot <= pslot + 1'b1;
          else begin
            fc_req <= 1'b1; fc_sel <= SEL_BIGRAM; fc_id <= slot_word[pslot[SW-1:0]];
            fc_slot <= pslot[SW-1:0];
            st <= F_PREF_W;
          end
        end
        F_PREF_W: if (fc_ack) begin
          fc_req <= 1'b0;
          pslot  <= pslot + 1'b1;
          st     <= F_PREF;
        end
        F_START: begin
          dc_start <= 1'b1; wa_start <= 1'b1;
          cur_word_v <= 1'b0;
          frame_best <= NEG_INF; cnt_active <= '0; cnt_words <= '0; nxt_cnt <= '0;
          for (int l = 0; l < SLOTS; l++) nxt_valid[l] <= 1'b0;
          st <= F_GET;
        end
        F_GET: if (!pause && !dc_start) begin
          if (wa_valid) begin
            e  <= wa_entry;
            st <= (cur_word_v && cur_word == wa_entry.word) ? F_HMM : F_WORD;
          end else if (wa_done) st <= F_FLUSH;
        end
        F_WORD: begin
          fc_req <= 1'b1; fc_sel <= SEL_WORD; fc_id <= e.word;
          st <= F_WORD_W;
        end
        F_WORD_W: if (fc_ack) begin
          fc_req <= 1'b0;
          word_line <= fc_line;
          num_hmms <= fc_line[23:16];
          cur_word <= e.word; cur_word_v <= 1'b1;
          st <= F_HMM;
        end
        F_HMM: begin
          fc_req <= 1'b1; fc_sel <= SEL_HMM; fc_pos <= e.hmm;
          fc_id  <= word_line[32 + 16*((int'(e.hmm) < WORD_MAX_HMMS) ? int'(e.hmm) : 0) +: 16];
          st <= F_HMM_W;
        end
        F_HMM_W: if (fc_ack) begin
          fc_req <= 1'b0;
          hmm_line <= fc_line;
          st <= F_S0;
        end
        F_S0: begin sr_rd <= 1'b1; sr_addr <= SAW'(hmm_line[15:0]);  st <= F_S1; end
        F_S1: begin sr_rd <= 1'b1; sr_addr <= SAW'(hmm_line[63:48]); st <= F_S2; end
        F_S2: begin sr_rd <= 1'b1; sr_addr <= SAW'(hmm_line[111:96]); sen[0] <= sr_data; st <= F_S3; end
        F_S3: begin sen[1] <= sr_data; st <= F_SCORE; end
        F_SCORE: begin
          sen[2]   <= sr_data;
          lat_done <= 1'b0;
          st       <= F_POST;
        end
        F_POST: if (!pause) begin
          automatic score_t best;
          automatic logic   exit_ok;
          best = smax(smax(ns[0], ns[1]), ns[2]);
          keep <= best >= hmm_thr && best > NEG_INF;
          exit_ok = is_last && ns[2] >= word_thr && ns[2] > NEG_INF && best >= hmm_thr && cnt_words < cfg.maxwpf;
          if (!lat_done) begin
            // first cycle: decide, write the lattice if needed
            if (exit_ok) begin
              if (lat_full) n_stall <= n_stall + 1;
              else begin
                lat_wr <= 1'b1;
                lat_entry <= '{word: e.word, pred: e.pred, score: ns[2], start_frame: e.start_frame,
                               last_start: e.hmm_start, last_end: frame_no};
                cnt_words <= cnt_words + 1;
                if (int'(nxt_cnt) < SLOTS) begin
                  nxt_valid[nxt_cnt[SW-1:0]] <= 1'b1;
                  nxt_word[nxt_cnt[SW-1:0]]  <= e.word;
                  nxt_score[nxt_cnt[SW-1:0]] <= ns[2];
                  nxt_cnt <= nxt_cnt + 1'b1;
                end
                lat_done <= 1'b1;
              end
            end else lat_done <= 1'b1;
            if (best >= hmm_thr && best > NEG_INF) frame_best <= smax(frame_best, best);
          end else if (!keep || push_ok) begin
            if (keep) cnt_active <= cnt_active + 1; else n_pruned <= n_pruned + 1;
            prop <= keep && !is_last && ns[2] >= hmm_thr && int'(e.hmm) + 1 < WORD_MAX_HMMS;
            st <= F_PROP;
          end
        end
        F_PROP: if (!pause) begin
          if (!prop) st <= F_GET;
          else if (push_ok) begin
            n_propagated <= n_propagated + 1;
            st <= F_GET;
          end
        end
        F_FLUSH: begin
          if (!held_v) begin dc_flush <= 1'b1; st <= F_FLUSH_W; end
          else if (wr_ready) held_v <= 1'b0;
        end
        F_FLUSH_W: if (dc_flushed) st <= F_END;
        F_END: begin
          ap_end <= 1'b1;
          al_len <= wr_count;
          region <= ~region;
          n_active <= cnt_active;
          n_words  <= cnt_words;
          for (int l = 0; l < SLOTS; l++) begin
            slot_valid[l] <= nxt_valid[l]; slot_word[l] <= nxt_word[l]; slot_score[l] <= nxt_score[l];
          end
          frame_done <= 1'b1;
          st <= F_IDLE;
        end
        default: st <= F_IDLE;
      endcase

      if (utt_start) begin
        st <= F_IDLE; al_len <= '0; region <= 1'b0; held_v <= 1'b0; fc_req <= 1'b0;
        for (int l = 0; l < SLOTS; l++) begin
          slot_valid[l] <= (l == 0); slot_word[l] <= '0; slot_score[l] <= '0;
        end
      end
    end
  end
endmodule
