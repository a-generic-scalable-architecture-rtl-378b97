// Flash control of the senone score unit.
//
// Walks the packed acoustic library in the 768-bit NOR flash and feeds the
// distance units. The library starts at line lib_offset and is read line by
// line, one read outstanding at a time. A two-line window of 32-bit words
// realigns the variable-length records:
//
//   <num_senones>
//   per senone:  <{senone_id[31:16], length[15:0]}>   length = words that follow
//     per mixture: <mixture_length> <weight> <log_reciprocal>
//                  mixture_length-2 dimension words {precision[31:16], mean[15:0]}
//
// (record order of the paper's packed structure; word layout is this
// design's). Each cycle in the dimension phase up to LANES dimension words
// leave the window together with dim_base, the index of the first; dim_first
// and dim_last mark the mixture, sen_last the last mixture of a senone.
// mix_weight and mix_recip hold the current mixture's header. hold freezes
// the walk (the score unit raises it while a mixture result is in flight).
// done rises when num_senones records have been walked.
//
// In table mode (tbl_start) lines 0..tbl_lines-1 are read and handed out raw
// on tbl_valid/tbl_line, one per tbl_take, for the log-add table load.
module ssu_flash_ctrl
  import asr_pkg::*;
#(
  parameter int LINE_W = 768,
  parameter int LANES  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       lib_offset,
  input  logic              hold,
  output logic              done,
  // NOR flash read port
  output logic              fl_req,
  output logic [31:0]       fl_addr,
  input  logic              fl_rvalid,
  input  logic [LINE_W-1:0] fl_rdata,
  // dimension stream
  output logic              dim_valid,
  output logic              dim_first,
  output logic              dim_last,
  output logic              sen_last,
  output logic [LANES-1:0]  dim_en,
  output logic [31:0]       dim_word [LANES],
  output logic [5:0]        dim_base,
  output score_t            mix_weight,
  output score_t            mix_recip,
  output logic [15:0]       sen_id,
  // raw line mode for the log-add table
  input  logic              tbl_start,
  input  logic [7:0]        tbl_lines,
  output logic              tbl_valid,
  output logic [LINE_W-1:0] tbl_line,
  input  logic              tbl_take
);
  localparam int WPL = LINE_W / 32;   // words per line
  localparam int WIN = 2 * WPL;
  localparam int CW  = $clog2(WIN + 1);

  typedef enum logic [2:0] {S_IDLE, S_NUM, S_HDR, S_MIX, S_DIM, S_DONE, S_TBL} state_e;
  state_e state;

  logic [31:0]   win [WIN];
  logic [CW-1:0] wcnt;
  logic          pending, drop;
  logic [31:0]   line_no;
  logic [31:0]   num_sen, sen_cnt;
  logic [15:0]   rem_sen;
  logic [15:0]   rem_dim;
  logic [7:0]    tbl_cnt;

  // how many words the current state pops
  logic [CW-1:0] need;
  logic          can_pop;
  always_comb begin
    case (state)
      S_NUM, S_HDR: need = 1;
      S_MIX:        need = 3;
      S_DIM:        need = (rem_dim >= 16'(LANES)) ? CW'(LANES) : CW'(rem_dim);
      default:      need = 0;
    endcase
    can_pop = !hold && need != 0 && wcnt >= need;
  end

  assign dim_valid = (state == S_DIM) && can_pop;
  assign dim_first = dim_base == 0;
  assign dim_last  = rem_dim <= 16'(LANES);
  assign sen_last  = dim_last && rem_sen == 0;
  always_comb
    for (int l = 0; l < LANES; l++) begin
      dim_en[l]   = 16'(l) < rem_dim;
      dim_word[l] = win[l];
    end

  // flash requests: keep the window fed
  logic want_line;
  assign want_line = !pending && (
      ((state == S_NUM || state == S_HDR || state == S_MIX || state == S_DIM) && wcnt <= CW'(WPL)) ||
      (state == S_TBL && !tbl_valid && tbl_cnt < tbl_lines));
  assign fl_req  = want_line;
  assign fl_addr = (state == S_TBL) ? 32'(tbl_cnt) : lib_offset + line_no;
  assign done    = state == S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; wcnt <= '0; pending <= 1'b0; drop <= 1'b0; line_no <= '0;
      num_sen <= '0; sen_cnt <= '0; rem_sen <= '0; rem_dim <= '0; dim_base <= '0;
      mix_weight <= '0; mix_recip <= '0; sen_id <= '0; tbl_cnt <= '0; tbl_valid <= 1'b0;
      tbl_line <= '0;
      for (int i = 0; i < WIN; i++) win[i] <= '0;
    end else begin
      automatic logic [CW-1:0] pop, left;
      pop  = can_pop ? need : '0;
      left = wcnt - pop;

      // window: drop popped words, append a returned line
      for (int i = 0; i < WIN; i++)
        win[i] <= (i + int'(pop) < WIN) ? win[i + int'(pop)] : 32'h0;
      if (fl_req) begin
        pending <= 1'b1;
        if (state == S_TBL) tbl_cnt <= tbl_cnt + 1'b1; else line_no <= line_no + 1;
      end
      if (fl_rvalid) begin
        pending <= 1'b0;
        drop    <= 1'b0;
        if (!drop && state == S_TBL) begin
          tbl_valid <= 1'b1;
          tbl_line  <= fl_rdata;
        end else if (!drop) begin
          for (int i = 0; i < WPL; i++)
            if (int'(left) + i < WIN) win[int'(left) + i] <= fl_rdata[32*i +: 32];
          left = left + CW'(WPL);
        end
      end
      wcnt <= left;
      if (tbl_take) tbl_valid <= 1'b0;

      case (state)
        S_IDLE, S_DONE: ;
        S_NUM: if (can_pop) begin
          num_sen <= win[0];
          sen_cnt <= '0;
          state   <= (win[0] == 0) ? S_DONE : S_HDR;
        end
        S_HDR: if (can_pop) begin
          sen_id  <= win[0][31:16];
          rem_sen <= win[0][15:0];
          state   <= S_MIX;
        end
        S_MIX: if (can_pop) begin
          rem_sen    <= rem_sen - 16'd1 - win[0][15:0];
          rem_dim    <= win[0][15:0] - 16'd2;
          mix_weight <= win[1];
          mix_recip  <= win[2];
          dim_base   <= '0;
          state      <= S_DIM;
        end
        S_DIM: if (can_pop) begin
          rem_dim  <= dim_last ? 16'd0 : rem_dim - 16'(LANES);
          dim_base <= dim_base + 6'(LANES);
          if (dim_last) begin
            if (rem_sen != 0)                 state <= S_MIX;
            else if (sen_cnt + 1 >= num_sen)  state <= S_DONE;
            else begin
              sen_cnt <= sen_cnt + 1;
              state   <= S_HDR;
            end
          end
        end
        S_TBL: if (tbl_cnt >= tbl_lines && !pending && !tbl_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      if (start || tbl_start) begin
        state   <= start ? S_NUM : S_TBL;
        line_no <= '0;
        tbl_cnt <= '0;
        wcnt    <= '0;
        drop    <= pending && !fl_rvalid;
      end
    end
  end
endmodule
