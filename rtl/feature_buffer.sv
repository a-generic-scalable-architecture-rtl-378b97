// Feature buffer for block senone scoring.
//
// Holds the feature vectors of the two frames of a block in two banks. The
// control unit fills the "fill" bank from LOAD_FEATURE_BLOCK data while the
// senone score unit reads the other bank; swap exchanges them when a new
// block is started. The read side returns LANES consecutive dimensions
// starting at rd_base for both frames in the same cycle (combinational), which
// is what the parallel distance units consume. Dimensions at or beyond
// MAX_FEAT read as zero. Double buffering and the 16-bit feature format are
// this design's choices; the paper gives the block of two frames.
module feature_buffer #(
  parameter int MAX_FEAT = 39,
  parameter int LANES    = 4,
  parameter int FRAMES   = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(FRAMES)-1:0]   wr_frame,
  input  logic [5:0]                  wr_idx,
  input  logic signed [15:0]          wr_data,
  input  logic                        swap,
  input  logic [5:0]                  rd_base,
  output logic signed [15:0]          rd_feat [FRAMES][LANES]
);
  logic signed [15:0] mem [2][FRAMES][MAX_FEAT];
  logic               rd_bank;   // bank read by the SSU; the other is filled

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int f = 0; f < FRAMES; f++)
          for (int n = 0; n < MAX_FEAT; n++) mem[b][f][n] <= '0;
    end else begin
      if (we && int'(wr_idx) < MAX_FEAT) mem[~rd_bank][wr_frame][wr_idx] <= wr_data;
      if (swap) rd_bank <= ~rd_bank;
    end
  end

  always_comb begin
    for (int f = 0; f < FRAMES; f++)
      for (int l = 0; l < LANES; l++) begin
        int idx;
        idx = int'(rd_base) + l;
        rd_feat[f][l] = (idx < MAX_FEAT) ? mem[rd_bank][f][idx] : '0;
      end
  end
endmodule
