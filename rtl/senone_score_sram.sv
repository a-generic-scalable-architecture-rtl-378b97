// Senone score SRAM, blocks N-1 and N.
//
// Two banks, each holding the scores of every senone for the two frames of a
// block. The senone score unit writes the bank of the block it is scoring
// while the Viterbi unit reads the bank of the previous block, so the two
// units never wait for each other (frame pipelining of the paper). Address =
// {bank, frame, senone}. One write port, one read port with one cycle of
// latency. 32-bit scores; the size is 2 x 2 x NUM_SENONES words.
module senone_score_sram
  import asr_pkg::*;
#(
  parameter int NUM_SENONES = 8000
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic                           wbank,
  input  logic                           wframe,
  input  logic [$clog2(NUM_SENONES)-1:0] waddr,
  input  score_t                         wdata,
  input  logic                           rd,
  input  logic                           rbank,
  input  logic                           rframe,
  input  logic [$clog2(NUM_SENONES)-1:0] raddr,
  output score_t                         rdata
);
  localparam int DEPTH = 4 * NUM_SENONES;
  score_t mem [DEPTH];

  function automatic int idx(input logic b, input logic f, input int s);
    return (int'(b) * 2 + int'(f)) * NUM_SENONES + s;
  endfunction

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < NUM_SENONES) mem[idx(wbank, wframe, int'(waddr))] <= wdata;
    if (rd) rdata <= (int'(raddr) < NUM_SENONES) ? mem[idx(rbank, rframe, int'(raddr))] : NEG_INF;
  end
endmodule
