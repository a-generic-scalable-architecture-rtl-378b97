// Active list DRAM controller.
//
// Each frame the Viterbi unit reads the old active list sequentially and
// writes the new one sequentially, so the DRAM is only ever accessed in whole
// pages. This controller keeps a read buffer and a write buffer of two pages
// each and alternates between reading one page of the old list and writing
// one page of the new list, as described in the paper. One DRAM word holds
// one active-list entry (width is this design's choice).
//
// Frame pass: start loads rd_base/rd_count/wr_base and clears the write
// count. The old list leaves on rd_valid/rd_entry (rd_take accepts);
// rd_done is high once all rd_count entries were taken. New entries enter on
// wr_valid/wr_entry while wr_ready. flush writes out the last partial page;
// flushed is high when everything has been written; wr_count is the length
// of the new list.
//
// DRAM port: one request per cycle (dr_req, dr_we, dr_addr in entries,
// dr_wdata); read data comes back in order on dr_rvalid/dr_rdata after any
// latency.
module dram_ctrl
  import asr_pkg::*;
#(
  parameter int PAGE = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] rd_base,
  input  logic [31:0] rd_count,
  input  logic [31:0] wr_base,
  output logic        rd_valid,
  output al_entry_t   rd_entry,
  input  logic        rd_take,
  output logic        rd_done,
  input  logic        wr_valid,
  input  al_entry_t   wr_entry,
  output logic        wr_ready,
  input  logic        flush,
  output logic        flushed,
  output logic [31:0] wr_count,
  output logic        dr_req,
  output logic        dr_we,
  output logic [31:0] dr_addr,
  output al_entry_t   dr_wdata,
  input  logic        dr_rvalid,
  input  al_entry_t   dr_rdata,
  output logic [31:0] n_rd_pages,
  output logic [31:0] n_wr_pages
);
  localparam int DEPTH = 2 * PAGE;
  localparam int PW    = $clog2(DEPTH);
  localparam int CW    = PW + 1;

  al_entry_t rbuf [DEPTH];
  al_entry_t wbuf [DEPTH];
  logic [PW-1:0] rwp, rrp, wwp, wrp;
  logic [CW-1:0] rcnt, wcnt, rinfl;
  logic [31:0]   rd_issued, rd_taken;
  logic [CW-1:0] burst;
  logic          last_rd, flushing;

  typedef enum logic [1:0] {B_IDLE, B_RD, B_WR} bstate_e;
  bstate_e bst;

  logic [31:0] rbase, rcount, wbase;   // pass parameters latched at start
  logic [31:0] rd_left;
  logic [CW-1:0] rfree, rburst;
  logic rd_possible, wr_possible;
  always_comb begin
    rd_left     = rcount - rd_issued;
    rfree       = CW'(DEPTH) - rcnt - rinfl;
    rburst      = (rd_left >= 32'(PAGE)) ? CW'(PAGE) : CW'(rd_left);
    rd_possible = rd_left != 0 && rfree >= rburst;
    wr_possible = wcnt >= CW'(PAGE) || (flushing && wcnt != 0);
  end

  assign rd_valid = rcnt != 0;
  assign rd_entry = rbuf[rrp];
  assign rd_done  = rd_taken == rcount;
  assign wr_ready = wcnt != CW'(DEPTH);
  assign flushed  = flushing && wcnt == 0 && bst != B_WR;

  always_ff @(posedge clk) begin
    if (dr_rvalid) rbuf[rwp] <= dr_rdata;
    if (wr_valid && wr_ready) wbuf[wwp] <= wr_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rwp <= '0; rrp <= '0; wwp <= '0; wrp <= '0; rcnt <= '0; wcnt <= '0; rinfl <= '0;
      rd_issued <= '0; rd_taken <= '0; burst <= '0; last_rd <= 1'b0; flushing <= 1'b0;
      bst <= B_IDLE; wr_count <= '0; dr_req <= 1'b0; dr_we <= 1'b0; dr_addr <= '0;
      dr_wdata <= '0; n_rd_pages <= '0; n_wr_pages <= '0;
      rbase <= '0; rcount <= '0; wbase <= '0;
    end else begin
      automatic logic r_in, r_out, w_in, w_out, i_rd;
      r_in  = dr_rvalid;
      r_out = rd_take && rd_valid;
      w_in  = wr_valid && wr_ready;
      w_out = 1'b0;
      i_rd  = 1'b0;
      dr_req <= 1'b0;
      dr_we  <= 1'b0;
      case (bst)
        B_IDLE: begin
          if (start) begin
            bst <= B_IDLE;               // parameters change this cycle
          end else if (wr_possible && (last_rd || !rd_possible)) begin
            bst   <= B_WR;
            burst <= (wcnt >= CW'(PAGE)) ? CW'(PAGE) : wcnt;
            n_wr_pages <= n_wr_pages + 1;
          end else if (rd_possible) begin
            bst   <= B_RD;
            burst <= rburst;
            n_rd_pages <= n_rd_pages + 1;
          end
        end
        B_RD: begin
          dr_req  <= 1'b1;
          dr_addr <= rbase + rd_issued;
          i_rd     = 1'b1;
          rd_issued <= rd_issued + 1;
          burst <= burst - 1'b1;
          if (burst == 1) begin bst <= B_IDLE; last_rd <= 1'b1; end
        end
        B_WR: begin
          dr_req   <= 1'b1;
          dr_we    <= 1'b1;
          dr_addr  <= wbase + wr_count;
          dr_wdata <= wbuf[wrp];
          w_out     = 1'b1;
          wrp      <= wrp + 1'b1;
          wr_count <= wr_count + 1;
          burst <= burst - 1'b1;
          if (burst == 1) begin bst <= B_IDLE; last_rd <= 1'b0; end
        end
        default: bst <= B_IDLE;
      endcase
      if (r_in)  rwp <= rwp + 1'b1;
      if (r_out) begin rrp <= rrp + 1'b1; rd_taken <= rd_taken + 1; end
      if (w_in)  wwp <= wwp + 1'b1;
      rcnt  <= rcnt + CW'(r_in) - CW'(r_out);
      wcnt  <= wcnt + CW'(w_in) - CW'(w_out);
      rinfl <= rinfl + CW'(i_rd) - CW'(r_in);
      if (flush) flushing <= 1'b1;
      if (start) begin
        rd_issued <= '0; rd_taken <= '0; wr_count <= '0; flushing <= 1'b0;
        rbase <= rd_base; rcount <= rd_count; wbase <= wr_base;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) dr_rvalid |-> rcnt < CW'(DEPTH));
endmodule
