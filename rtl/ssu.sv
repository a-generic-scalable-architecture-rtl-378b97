// Senone Score Unit (SSU).
//
// Scores every senone of the acoustic library for both frames of a block
// while reading the library from flash only once (block senone scoring):
//
//   mixture score  m_f = weight + log_reciprocal - dist_f       (Eq. 2.5)
//   senone score   s_f = log-add over the mixtures of m_f       (Eq. 2.4)
//
// ssu_flash_ctrl walks the packed library and streams LANES dimensions per
// cycle into distance_calc, which takes the features of both frames from the
// feature buffer. The result of each mixture is weighted and log-added into a
// per-frame accumulator by one log_add unit per frame; at the end of a
// senone record both scores are written to the senone score SRAM (outside
// this module) at {bank, frame, senone ID}. While a mixture result is in
// flight the walk is held, so one mixture is in the arithmetic at a time.
//
// start (with bank) swaps the feature buffer and scores one block; done
// pulses when the last score is written. init_start loads the log-add table
// (TBL_DEPTH 16-bit entries, 48 per flash line, from flash line 0) into both
// log-add units; init_done pulses at the end. pause freezes the walk.
// The structure (incrementer and feature buffer, flash control, distance
// calculation, logarithmic addition, score SRAM) follows the paper; the
// one-mixture-at-a-time sequencing and the formats are this design's.
module ssu
  import asr_pkg::*;
#(
  parameter int NUM_SENONES = 8000,
  parameter int MAX_FEAT    = 39,
  parameter int LANES       = 4,
  parameter int LINE_W      = 768,
  parameter int TBL_DEPTH   = 4096,
  parameter int TBL_SHIFT   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              utt_start,
  input  logic              start,
  input  logic              bank,
  input  logic [31:0]       lib_offset,
  input  logic              pause,
  output logic              done,
  input  logic              init_start,
  output logic              init_done,
  // feature buffer write (from the control unit)
  input  logic              feat_we,
  input  logic              feat_frame,
  input  logic [5:0]        feat_idx,
  input  logic signed [15:0] feat_data,
  // acoustic model NOR flash
  output logic              fl_req,
  output logic [31:0]       fl_addr,
  input  logic              fl_rvalid,
  input  logic [LINE_W-1:0] fl_rdata,
  // senone score SRAM write port
  output logic              sc_we,
  output logic              sc_bank,
  output logic              sc_frame,
  output logic [$clog2(NUM_SENONES)-1:0] sc_addr,
  output score_t            sc_data,
  output logic [31:0]       n_scored      // senones scored in the last block
);
  localparam int EPL   = LINE_W / 16;                       // table entries per line
  localparam int TLINES = (TBL_DEPTH + EPL - 1) / EPL;
  localparam int TAW   = $clog2(TBL_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_WR1, S_FIN, S_TBL} state_e;
  state_e state;

  // flash control
  logic              fc_done, dim_valid, dim_first, dim_last, sen_last, hold;
  logic [LANES-1:0]  dim_en;
  logic [31:0]       dim_word [LANES];
  logic [5:0]        dim_base;
  score_t            mix_weight, mix_recip;
  logic [15:0]       sen_id;
  logic              tbl_valid, tbl_take;
  logic [LINE_W-1:0] tbl_line;
  logic              busy;

  assign hold = busy || pause || state == S_WR1;

  ssu_flash_ctrl #(.LINE_W(LINE_W), .LANES(LANES)) u_fc (
    .clk, .rst_n, .start(start && state == S_IDLE), .lib_offset, .hold, .done(fc_done),
    .fl_req, .fl_addr, .fl_rvalid, .fl_rdata,
    .dim_valid, .dim_first, .dim_last, .sen_last, .dim_en, .dim_word, .dim_base,
    .mix_weight, .mix_recip, .sen_id,
    .tbl_start(init_start && state == S_IDLE), .tbl_lines(8'(TLINES)),
    .tbl_valid, .tbl_line, .tbl_take);

  // feature buffer (SenoneID incrementer & feature buffer for block)
  logic signed [15:0] feat [2][LANES];
  feature_buffer #(.MAX_FEAT(MAX_FEAT), .LANES(LANES), .FRAMES(2)) u_fb (
    .clk, .rst_n, .we(feat_we), .wr_frame(feat_frame), .wr_idx(feat_idx), .wr_data(feat_data),
    .swap(start && state == S_IDLE), .rd_base(dim_base), .rd_feat(feat));

  // distance calculation
  logic signed [15:0] mean [LANES];
  logic [15:0]        prec [LANES];
  always_comb
    for (int l = 0; l < LANES; l++) begin
      mean[l] = dim_word[l][15:0];
      prec[l] = dim_word[l][31:16];
    end
  logic   dc_valid;
  score_t mdist [2];
  distance_calc #(.LANES(LANES), .FRAMES(2)) u_dc (
    .clk, .rst_n, .in_valid(dim_valid), .in_first(dim_first), .in_last(dim_last),
    .lane_en(dim_en), .mean, .prec, .feat, .out_valid(dc_valid), .mdist);

  // weight, then log-add into the accumulators
  score_t acc [2];
  score_t msc [2];
  logic   la_valid [2];
  score_t la_sum [2];
  logic   tbl_we;
  logic [TAW-1:0] tbl_addr;
  logic [15:0]    tbl_data;
  always_comb
    for (int f = 0; f < 2; f++) msc[f] = sadd(sadd(mix_weight, mix_recip), -mdist[f]);

  for (genvar f = 0; f < 2; f++) begin : g_la
    log_add #(.DEPTH(TBL_DEPTH), .SHIFT(TBL_SHIFT), .ENTRY_W(16)) u_la (
      .clk, .rst_n, .tbl_we, .tbl_addr, .tbl_data,
      .in_valid(dc_valid), .a(acc[f]), .b(msc[f]), .out_valid(la_valid[f]), .sum(la_sum[f]));
  end

  // table load sequencing
  logic [$clog2(EPL+1)-1:0] tpos;
  logic [TAW:0]             tcount;
  assign tbl_we   = state == S_TBL && tbl_valid && tcount < (TAW+1)'(TBL_DEPTH);
  assign tbl_addr = tcount[TAW-1:0];
  assign tbl_data = tbl_line[16*tpos +: 16];
  assign tbl_take = state == S_TBL && tbl_valid && (int'(tpos) == EPL-1 || tcount >= (TAW+1)'(TBL_DEPTH-1));

  logic   sen_last_r, bank_r;
  score_t s1_r;
  logic [15:0] sid_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; init_done <= 1'b0;
      acc[0] <= NEG_INF; acc[1] <= NEG_INF; sen_last_r <= 1'b0; bank_r <= 1'b0;
      sc_we <= 1'b0; sc_bank <= 1'b0; sc_frame <= 1'b0; sc_addr <= '0; sc_data <= '0;
      s1_r <= '0; sid_r <= '0; tpos <= '0; tcount <= '0; n_scored <= '0;
    end else begin
      done <= 1'b0; init_done <= 1'b0; sc_we <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN; bank_r <= bank; n_scored <= '0;
            acc[0] <= NEG_INF; acc[1] <= NEG_INF;
          end else if (init_start) begin
            state <= S_TBL; tpos <= '0; tcount <= '0;
          end
        end
        S_RUN: begin
          if (dim_valid && dim_last) begin
            busy <= 1'b1;
            sen_last_r <= sen_last;
            sid_r <= sen_id;
          end
          if (la_valid[0]) begin
            if (sen_last_r) begin
              // write frame 0 now, frame 1 next cycle
              sc_we <= 1'b1; sc_bank <= bank_r; sc_frame <= 1'b0;
              sc_addr <= ($clog2(NUM_SENONES))'(sid_r); sc_data <= la_sum[0];
              s1_r <= la_sum[1];
              acc[0] <= NEG_INF; acc[1] <= NEG_INF;
              state <= S_WR1;
            end else begin
              acc[0] <= la_sum[0]; acc[1] <= la_sum[1];
              busy <= 1'b0;
            end
          end
          if (fc_done && !busy && !(dim_valid && dim_last)) state <= S_FIN;
        end
        S_WR1: begin
          sc_we <= 1'b1; sc_frame <= 1'b1; sc_data <= s1_r;
          n_scored <= n_scored + 1;
          busy <= 1'b0;
          state <= S_RUN;
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_TBL: begin
          if (tbl_we) tcount <= tcount + 1'b1;
          if (tbl_valid) tpos <= tbl_take ? '0 : tpos + 1'b1;
          if (tcount >= (TAW+1)'(TBL_DEPTH) && !tbl_valid) begin
            init_done <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (utt_start) begin
        acc[0] <= NEG_INF; acc[1] <= NEG_INF;
      end
    end
  end
endmodule
