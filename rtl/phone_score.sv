// Phone scoring unit: the add-compare-select of Eq. 2.7 for one HMM state.
//
// new = max(own + tp_self, left + tp_in) + senone_score
//
// "own" is the state's score in the previous frame, "left" the previous
// frame's score of the state to its left (or the score entering the HMM for
// state 0). The transition probabilities are added first, the two paths are
// compared, and the senone score of the current frame is added to the winner,
// as in the phone scoring unit of the paper (compare, then add). All adds
// saturate and keep NEG_INF sticky. Purely combinational; the Viterbi unit
// registers the result.
module phone_score
  import asr_pkg::*;
(
  input  score_t own,
  input  score_t left,
  input  score_t tp_self,
  input  score_t tp_in,
  input  score_t senone,
  output score_t score,
  output logic   from_left   // the left path won the compare
);
  score_t p_self, p_left;
  always_comb begin
    p_self    = sadd(own, tp_self);
    p_left    = sadd(left, tp_in);
    from_left = p_left > p_self;
    score     = sadd(from_left ? p_left : p_self, senone);
  end
endmodule
