// Distance calculation for senone scoring: the inner sum of Eq. 2.5,
//
//   dist_f = sum_n (y_f[n] - mu[n])^2 * V[n]
//
// for both frames f of a block at once, so each Gaussian read from flash is
// used twice. LANES subtract-square-multiply units per frame work on LANES
// dimensions per cycle and feed a two-stage adder tree, as in the paper
// (4 units, 2 stages of addition). A fourth stage accumulates the lane groups
// of one mixture: in_first starts a mixture, in_last ends it, and out_valid
// with the two distances (mdist) follows 4 cycles after in_last.
//
// Numbers: features and means are signed 16-bit, the precision V is unsigned
// 16-bit with VAR_SHIFT fraction bits and already carries the factor 1/2 and
// the change to log base 1.0003, so no further scaling is needed. The result
// saturates at SCORE_MAX. Fixed point formats are this design's choice.
module distance_calc
  import asr_pkg::*;
#(
  parameter int LANES     = 4,
  parameter int FRAMES    = 2,
  parameter int VAR_SHIFT = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [LANES-1:0]         lane_en,
  input  logic signed [15:0]       mean [LANES],
  input  logic [15:0]              prec [LANES],
  input  logic signed [15:0]       feat [FRAMES][LANES],
  output logic                     out_valid,
  output score_t                   mdist [FRAMES]
);
  localparam int PW = 40;

  // stage 1: subtract, square, multiply
  logic [PW-1:0] p1 [FRAMES][LANES];
  logic          v1, f1, l1;
  always_ff @(posedge clk) begin
    for (int f = 0; f < FRAMES; f++)
      for (int l = 0; l < LANES; l++) begin
        logic signed [16:0] d;
        logic [33:0]        sq;
        logic [49:0]        pr;
        d  = 17'(feat[f][l]) - 17'(mean[l]);
        sq = 34'(d * d);
        pr = 50'(sq) * 50'(prec[l]);
        p1[f][l] <= lane_en[l] ? PW'(pr >> VAR_SHIFT) : '0;
      end
  end

  // stages 2 and 3: adder tree (sum of all lanes)
  logic [PW-1:0] s2 [FRAMES][LANES/2];
  logic [PW-1:0] s3 [FRAMES];
  logic          v2, f2, l2, v3, f3, l3;
  always_ff @(posedge clk) begin
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 0; k < LANES/2; k++) s2[f][k] <= p1[f][2*k] + p1[f][2*k+1];
    end
  end
  always_ff @(posedge clk) begin
    for (int f = 0; f < FRAMES; f++) begin
      logic [PW-1:0] t;
      t = '0;
      for (int k = 0; k < LANES/2; k++) t = t + s2[f][k];
      s3[f] <= t;
    end
  end

  // stage 4: accumulate lane groups of one mixture
  logic [PW-1:0] acc [FRAMES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, f1, l1, v2, f2, l2, v3, f3, l3, out_valid} <= '0;
      for (int f = 0; f < FRAMES; f++) begin
        acc[f]  <= '0;
        mdist[f] <= '0;
      end
    end else begin
      v1 <= in_valid; f1 <= in_first; l1 <= in_last;
      v2 <= v1;       f2 <= f1;       l2 <= l1;
      v3 <= v2;       f3 <= f2;       l3 <= l2;
      out_valid <= v3 && l3;
      if (v3) begin
        for (int f = 0; f < FRAMES; f++) begin
          automatic logic [PW-1:0] a;
          a = (f3 ? '0 : acc[f]) + s3[f];
          acc[f] <= a;
          if (l3) mdist[f] <= (a > PW'(SCORE_MAX)) ? SCORE_MAX : score_t'(a);
        end
      end
    end
  end
endmodule
