// Word lattice buffer.
//
// SRAM holding recognised words (lattice nodes) as a FIFO: the Viterbi unit
// writes one node per word exit, READ_LATTICE in the control unit drains them
// in order. When the buffer is full the Viterbi unit must stall until software
// has read entries (full is asserted, a write while full is refused). The
// node format <word, predecessor, score, start frame, start and end frame of
// the last HMM> is the paper's; DEPTH = 1024 nodes of 16 bytes fills the
// 16 KB lattice SRAM. Read data is registered: rentry is valid the cycle
// after rd.
module lattice_buffer
  import asr_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr,
  input  lattice_t                 wentry,
  output logic                     full,
  input  logic                     rd,
  output lattice_t                 rentry,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);
  lattice_t    mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp] <= wentry;
    if (rd) rentry <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      automatic logic do_w, do_r;
      do_w = wr && !full;
      do_r = rd && count != 0;
      if (do_w) wp <= wp + 1'b1;
      if (do_r) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> count != 0);
endmodule
