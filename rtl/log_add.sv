// Logarithmic addition: sum = log(A + B) from a = log A and b = log B.
//
// log(A+B) = max(a,b) + log(1 + base^-(|a-b|)), base 1.0003. The correction
// term comes from a look-up table held in SRAM and loaded at INIT. Entry k
// holds round(log_base(1 + base^-(k*2^SHIFT))); differences beyond the table
// get no correction. Two pipeline stages: stage 1 takes the max and the table
// address, stage 2 reads the table and adds. NEG_INF operands pass the other
// operand through unchanged. The table-based method follows the paper; its
// size and quantisation are this design's choice.
module log_add
  import asr_pkg::*;
#(
  parameter int DEPTH   = 4096,
  parameter int SHIFT   = 3,
  parameter int ENTRY_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tbl_we,
  input  logic [$clog2(DEPTH)-1:0] tbl_addr,
  input  logic [ENTRY_W-1:0]       tbl_data,
  input  logic                     in_valid,
  input  score_t                   a,
  input  score_t                   b,
  output logic                     out_valid,
  output score_t                   sum
);
  localparam int AW = $clog2(DEPTH);
  logic [ENTRY_W-1:0] tbl [DEPTH];

  logic [32:0] diff;
  score_t      mx;
  logic        in_range;
  always_comb begin
    mx       = smax(a, b);
    diff     = (a > b) ? 33'(a) - 33'(b) : 33'(b) - 33'(a);
    in_range = (diff >> SHIFT) < 33'(DEPTH) && a > NEG_INF && b > NEG_INF;
  end

  logic              v1, use1;
  score_t            mx1;
  logic [AW-1:0]     addr1;
  logic [ENTRY_W-1:0] corr;

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_addr] <= tbl_data;
    corr <= tbl[addr1];
  end

  logic   v2, use2;
  score_t mx2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; use1 <= 1'b0; use2 <= 1'b0;
      mx1 <= NEG_INF; mx2 <= NEG_INF; addr1 <= '0;
    end else begin
      v1    <= in_valid;
      mx1   <= mx;
      use1  <= in_range;
      addr1 <= AW'(diff >> SHIFT);
      v2    <= v1;
      mx2   <= mx1;
      use2  <= use1;
    end
  end

  assign out_valid = v2;
  assign sum = use2 ? sadd(mx2, score_t'({1'b0, corr})) : mx2;
endmodule
