// Flash control of the Viterbi unit: address translation, HMM caching and
// bigram prefetch.
//
// Serves three kinds of request on the 256-bit language model NOR flash
// (sel): a word line (word ID), an HMM line (HMM ID, with its position in the
// current word) and a bigram row (source word ID, into prefetch slot `slot`).
// Address translation, in flash lines from lm_offset:
//   word    lm_offset + word ID
//   HMM     lm_offset + WORD_LINES + HMM ID
//   bigram  lm_offset + WORD_LINES + HMM_LINES + BG_LINES * source word ID
// The HMMs of the current word are kept in a small cache (HMM_CACHE lines,
// direct mapped by position in the word); a word request purges it, so HMMs
// are never shared across words, as in the paper. A bigram request reads
// BG_LINES lines and unpacks their <dest word, LM prob> pairs (7 per line,
// dest 16'hFFFF ends the row) into the slot; the slots together form the
// bigram prefetch SRAM and are read by the word activation block.
//
// Handshake: req is held until ack; ack pulses with line valid for word and
// HMM requests (one cycle after req on a cache hit, flash latency + 1 on a
// miss). One flash read is outstanding at a time. The overflow linked lists
// of the paper's flash format are not followed: a word holds at most 12 HMMs
// and a bigram row at most 7*BG_LINES successors.
module vu_flash_ctrl
  import asr_pkg::*;
#(
  parameter int LINE_W     = 256,
  parameter int HMM_CACHE  = 5,
  parameter int SLOTS      = 16,
  parameter int BG_LINES   = 2,
  parameter int WORD_LINES = 65536,
  parameter int HMM_LINES  = 65536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       lm_offset,
  input  logic              req,
  input  vsel_e             sel,
  input  logic [15:0]       id,
  input  logic [3:0]        pos,
  input  logic [$clog2(SLOTS)-1:0] slot,
  output logic              ack,
  output logic [LINE_W-1:0] line,
  output logic              hit,
  input  logic              bg_clear,
  output logic [15:0]       bg_dest [SLOTS][BG_PER_LINE*BG_LINES],
  output score_t            bg_prob [SLOTS][BG_PER_LINE*BG_LINES],
  output logic [4:0]        bg_n    [SLOTS],
  output logic              fl_req,
  output logic [31:0]       fl_addr,
  input  logic              fl_rvalid,
  input  logic [LINE_W-1:0] fl_rdata,
  output logic [31:0]       n_hits,
  output logic [31:0]       n_misses
);
  localparam int BPS = BG_PER_LINE * BG_LINES;
  localparam int CW  = $clog2(HMM_CACHE);

  logic [LINE_W-1:0] cache_line [HMM_CACHE];
  logic [3:0]        cache_tag  [HMM_CACHE];
  logic              cache_v    [HMM_CACHE];

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_ACK} state_e;
  state_e state;
  logic [$clog2(BG_LINES+1)-1:0] bg_line;
  logic                          bg_end;

  logic [CW-1:0] cidx;
  assign cidx = CW'(int'(pos) % HMM_CACHE);
  logic chit;
  assign chit = sel == SEL_HMM && cache_v[cidx] && cache_tag[cidx] == pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; ack <= 1'b0; hit <= 1'b0; line <= '0; fl_req <= 1'b0; fl_addr <= '0;
      bg_line <= '0; bg_end <= 1'b0; n_hits <= '0; n_misses <= '0;
      for (int c = 0; c < HMM_CACHE; c++) begin
        cache_v[c] <= 1'b0; cache_tag[c] <= '0; cache_line[c] <= '0;
      end
      for (int s = 0; s < SLOTS; s++) begin
        bg_n[s] <= '0;
        for (int k = 0; k < BPS; k++) begin bg_dest[s][k] <= '0; bg_prob[s][k] <= '0; end
      end
    end else begin
      ack    <= 1'b0;
      fl_req <= 1'b0;
      if (bg_clear) for (int s = 0; s < SLOTS; s++) bg_n[s] <= '0;
      case (state)
        C_IDLE: if (req && !ack) begin
          hit <= 1'b0;
          if (chit) begin
            line   <= cache_line[cidx];
            hit    <= 1'b1;
            ack    <= 1'b1;
            n_hits <= n_hits + 1;
          end else begin
            fl_req <= 1'b1;
            state  <= C_WAIT;
            unique case (sel)
              SEL_WORD: begin
                fl_addr <= lm_offset + 32'(id);
                for (int c = 0; c < HMM_CACHE; c++) cache_v[c] <= 1'b0;  // purge
              end
              SEL_HMM: begin
                fl_addr  <= lm_offset + 32'(WORD_LINES) + 32'(id);
                n_misses <= n_misses + 1;
              end
              default: begin
                fl_addr <= lm_offset + 32'(WORD_LINES) + 32'(HMM_LINES) + 32'(BG_LINES) * 32'(id);
                bg_line <= '0;
                bg_end  <= 1'b0;
                bg_n[slot] <= '0;
              end
            endcase
          end
        end
        C_WAIT: if (fl_rvalid) begin
          if (sel == SEL_BIGRAM) begin
            automatic logic [4:0] n;
            automatic logic       e;
            n = bg_n[slot];
            e = bg_end;
            for (int k = 0; k < BG_PER_LINE; k++) begin
              automatic logic [15:0] d;
              d = fl_rdata[32*k +: 16];
              if (d == 16'hFFFF) e = 1'b1;
              if (!e) begin
                bg_dest[slot][int'(bg_line)*BG_PER_LINE + k] <= d;
                bg_prob[slot][int'(bg_line)*BG_PER_LINE + k] <= score_t'($signed(fl_rdata[32*k+16 +: 16]));
                n = n + 1'b1;
              end
            end
            bg_n[slot] <= n;
            bg_end     <= e;
            if (int'(bg_line) + 1 < BG_LINES && !e) begin
              bg_line <= bg_line + 1'b1;
              fl_addr <= fl_addr + 1;
              fl_req  <= 1'b1;
            end else begin
              ack   <= 1'b1;
              state <= C_ACK;
            end
          end else begin
            line <= fl_rdata;
            ack  <= 1'b1;
            if (sel == SEL_HMM) begin
              cache_line[cidx] <= fl_rdata;
              cache_tag[cidx]  <= pos;
              cache_v[cidx]    <= 1'b1;
            end
            state <= C_ACK;
          end
        end
        C_ACK: state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
