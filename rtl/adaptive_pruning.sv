// Adaptive pruning: per-frame beam width update of Eq. 4.1.
//
//   T(t+1) = T(t) + alpha * (1.1 * Nset - N(t)),   alpha = 0.2
//
// The beam is only adapted when more than Nset HMMs (or words) were active in
// frame t; otherwise it returns to the initial beam T0 set by software. It is
// never made wider than T0 nor negative. The threshold used to prune frame
// t+1 is the best score of frame t minus the beam. One instance serves the
// HMM beam (Nset = maxhmmpf) and one the word exit beam (Nset = maxwpf).
//
// Timing: beam and threshold are registered on the cycle frame_end is high;
// utt_start reloads T0 and opens the threshold (NEG_INF): the first frame
// has no previous best score to measure the beam from.
module adaptive_pruning
  import asr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        utt_start,
  input  logic        frame_end,
  input  logic [31:0] n_active,
  input  logic [31:0] n_set,
  input  score_t      init_beam,
  input  score_t      best,       // best score of the frame that just ended
  output score_t      beam,
  output score_t      threshold
);
  logic signed [35:0] tol, delta, nb;
  always_comb begin
    tol   = signed'(36'(n_set) + 36'(n_set / 10));          // 1.1 * Nset
    delta = (tol - signed'(36'(n_active))) / 5;            // alpha = 0.2
    nb    = 36'(beam) + delta;
    if (n_active <= n_set) nb = 36'(init_beam);    // no adaptation: back to T0
    if (nb > 36'(init_beam)) nb = 36'(init_beam);  // never wider than T0
    if (nb < 0) nb = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beam      <= '0;
      threshold <= NEG_INF;
    end else if (utt_start) begin
      beam      <= init_beam;
      threshold <= NEG_INF;                       // no reference score before frame 0
    end else if (frame_end) begin
      beam      <= score_t'(nb);
      threshold <= (best <= NEG_INF) ? NEG_INF : sadd(best, -score_t'(nb));
    end
  end
endmodule
