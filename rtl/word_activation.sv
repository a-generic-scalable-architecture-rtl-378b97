// New word activation (flow control, new word insert, new word modify, bypass).
//
// Sits between the old active list coming from DRAM and the scoring datapath
// of the Viterbi unit. The old list is in ascending word order. The words
// that exited into the lattice in the last frame are held in SLOTS slots,
// each with its bigram row (successor words in ascending order with their LM
// probabilities) prefetched from flash. A head pointer per slot walks that
// row in step with the old list, so successors are visited in word order:
//   - an old entry of a word with no pending successor passes unchanged
//     (bypass);
//   - an old first-HMM entry of word d whose predecessor is a slot word with
//     d at its head takes the better of its own entry score and
//     slot score + bigram prob (modify);
//   - once the old entries of word d are through, each remaining slot with d
//     at its head appends a new entry (d, slot word, HMM 0) with entry score
//     slot score + bigram prob and all states at NEG_INF (insert).
// At most max_n_best first-HMM entries per word are passed; further new
// entries are dropped (word dependent N-best limit). Only bigram successors
// are activated. The old stream and the output use valid/take handshakes
// (take = accepted this cycle); done is high once the old list has ended and
// no slot has a successor left.
module word_activation
  import asr_pkg::*;
#(
  parameter int SLOTS = 16,
  parameter int BPS   = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // new frame: rewind head pointers
  input  logic [15:0]       frame_no,
  input  logic [7:0]        max_n_best,
  input  logic              old_valid,
  input  al_entry_t         old_entry,
  input  logic              old_done,
  output logic              old_take,
  input  logic              slot_valid [SLOTS],
  input  logic [15:0]       slot_word  [SLOTS],
  input  score_t            slot_score [SLOTS],
  input  logic [15:0]       bg_dest [SLOTS][BPS],
  input  score_t            bg_prob [SLOTS][BPS],
  input  logic [4:0]        bg_n    [SLOTS],
  output logic              out_valid,
  output al_entry_t         out_entry,
  input  logic              out_take,
  output logic              done,
  output logic [31:0]       n_bypass,
  output logic [31:0]       n_modify,
  output logic [31:0]       n_insert,
  output logic [31:0]       n_capped
);
  localparam int SW = $clog2(SLOTS);
  localparam int HW = $clog2(BPS);
  logic [4:0] h [SLOTS];

  function automatic logic [HW-1:0] hidx(input logic [4:0] p);
    return (int'(p) < BPS) ? HW'(p) : '0;
  endfunction

  logic              hv   [SLOTS];
  logic [15:0]       hd   [SLOTS];
  score_t            hs   [SLOTS];   // slot score + bigram prob
  logic              any_new;
  logic [15:0]       d_new;
  logic [SW-1:0]     first_l;
  always_comb begin
    any_new = 1'b0;
    d_new   = 16'hFFFF;
    first_l = '0;
    for (int l = 0; l < SLOTS; l++) begin
      hv[l] = slot_valid[l] && h[l] < bg_n[l];
      hd[l] = bg_dest[l][hidx(h[l])];
      hs[l] = sadd(slot_score[l], bg_prob[l][hidx(h[l])]);
    end
    for (int l = SLOTS - 1; l >= 0; l--)
      if (hv[l] && (!any_new || hd[l] <= d_new)) begin
        any_new = 1'b1;
        d_new   = hd[l];
        first_l = SW'(l);
      end
  end

  // decide what this cycle does
  logic      take_old, do_insert;
  logic      match [SLOTS];
  al_entry_t mod_e, new_e;
  logic [15:0] cur_word;
  logic        cur_v;
  logic [7:0]  nb_cnt;
  logic [7:0]  cnt_for;   // first-HMM entries already passed for the word at hand
  always_comb begin
    take_old  = old_valid && (!any_new || old_entry.word <= d_new);
    do_insert = !take_old && any_new && (old_done && !old_valid || old_valid && old_entry.word > d_new);
    mod_e = old_entry;
    for (int l = 0; l < SLOTS; l++) begin
      match[l] = take_old && hv[l] && hd[l] == old_entry.word && old_entry.hmm == 0 &&
                 slot_word[l] == old_entry.pred;
      if (match[l]) mod_e.in_score = smax(mod_e.in_score, hs[l]);
    end
    new_e             = '0;
    new_e.word        = d_new;
    new_e.pred        = slot_word[first_l];
    new_e.hmm         = '0;
    new_e.start_frame = frame_no;
    new_e.hmm_start   = frame_no;
    new_e.in_score    = hs[first_l];
    new_e.st0         = NEG_INF;
    new_e.st1         = NEG_INF;
    new_e.st2         = NEG_INF;
    cnt_for = (cur_v && cur_word == (take_old ? old_entry.word : d_new)) ? nb_cnt : 8'd0;
  end

  logic capped;
  assign capped    = do_insert && cnt_for >= max_n_best;
  assign out_valid = take_old || (do_insert && !capped);
  assign out_entry = take_old ? mod_e : new_e;
  assign old_take  = take_old && out_take;
  assign done      = old_done && !old_valid && !any_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < SLOTS; l++) h[l] <= '0;
      cur_word <= '0; cur_v <= 1'b0; nb_cnt <= '0;
      n_bypass <= '0; n_modify <= '0; n_insert <= '0; n_capped <= '0;
    end else if (start) begin
      for (int l = 0; l < SLOTS; l++) h[l] <= '0;
      cur_v <= 1'b0; nb_cnt <= '0;
    end else begin
      if ((out_valid && out_take) || capped) begin
        automatic logic is_first;
        is_first = take_old ? old_entry.hmm == 0 : 1'b1;
        cur_word <= take_old ? old_entry.word : d_new;
        cur_v    <= 1'b1;
        nb_cnt   <= cnt_for + (capped ? 8'd0 : 8'(is_first));
        if (take_old) begin
          automatic logic m;
          m = 1'b0;
          for (int l = 0; l < SLOTS; l++) if (match[l]) begin h[l] <= h[l] + 1'b1; m = 1'b1; end
          if (m) n_modify <= n_modify + 1; else n_bypass <= n_bypass + 1;
        end else begin
          h[first_l] <= h[first_l] + 1'b1;
          if (capped) n_capped <= n_capped + 1; else n_insert <= n_insert + 1;
        end
      end
    end
  end
endmodule
