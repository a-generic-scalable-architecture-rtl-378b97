// Interface and Control Unit.
//
// Decodes the command bytes the CPU sends over the SPI link, keeps the
// configuration registers, loads feature blocks into the SSU's feature
// buffer, schedules the senone score unit (SSU) and the Viterbi unit (VU),
// and returns the word lattice.
//
// Command = opcode byte + payload in one chip-select frame (opcodes in
// asr_pkg::opcode_e; codes and payload layouts are this design's):
//   SET_* (acoustic/language model offset, HMM and word beams, maxhmmpf,
//   maxwpf, max N-best, feature length, HMM length, max mixtures): 4 bytes,
//   big-endian; SET_UTTERANCE_ID: 4 bytes, then an internal reset of SSU and
//   VU; INIT: loads the log-add table from flash; PAUSE / RESUME: freeze and
//   release both units; LOAD_FEATURE_BLOCK: 2 x feature_length signed 16-bit
//   features, frame 0 then frame 1; READ_LATTICE: one count byte, after which
//   the response is a length byte (entries actually returned) followed by 14
//   bytes per lattice node, most significant field first.
//
// Scheduling follows the frame pipeline of the paper: the SSU scores block n
// into score bank n mod 2 while the VU decodes the two frames of block n-1
// from the other bank. Block n may only start once the VU has finished block
// n-2. A LOAD_FEATURE_BLOCK that arrives while the previous block still waits
// for the SSU is dropped and counted in n_overrun.
module icu
  import asr_pkg::*;
#(
  parameter int MAX_FEAT  = 39,
  parameter int LAT_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        frame_end,
  output logic        tx_mode,
  output logic [7:0]  tx_data,
  input  logic        tx_take,
  output cfg_t        cfg,
  output logic [31:0] utt_id,
  output logic        utt_start,
  output logic        pause,
  output logic        init_start,
  input  logic        init_done,
  output logic        feat_we,
  output logic        feat_frame,
  output logic [5:0]  feat_idx,
  output logic signed [15:0] feat_data,
  output logic        ssu_start,
  output logic        ssu_bank,
  input  logic        ssu_done,
  output logic        vu_start,
  output logic        vu_bank,
  output logic        vu_fidx,
  output logic [15:0] frame_no,
  input  logic        vu_done,
  output logic        lat_rd,
  input  lattice_t    lat_entry,
  input  logic [$clog2(LAT_DEPTH):0] lat_count,
  output logic        lat_clear,
  output logic [31:0] n_overrun,
  output logic [31:0] n_blocks_scored,
  output logic [31:0] n_frames_decoded,
  output logic        busy
);
  typedef enum logic [2:0] {I_OP, I_ARG, I_FEAT, I_RLEN, I_TX, I_SKIP} istate_e;
  istate_e st;
  opcode_e op;
  logic [1:0]  argn;
  logic [31:0] arg;
  logic [7:0]  fpos;        // feature index within the frame
  logic        fframe;
  logic        fhalf;
  logic [7:0]  fhi;
  logic        blk_pending, ssu_busy, vu_busy, init_busy;
  logic [31:0] ssu_started, vu_blocks, ssu_blocks;
  logic        vu_f;

  // response
  logic [7:0]  tx_len, ent_left;
  logic [3:0]  bpos;
  logic        hdr;
  logic        load_next, load_d;
  lattice_t    txbuf;

  always_comb begin
    if (hdr) tx_data = tx_len;
    else     tx_data = txbuf[LAT_W-1-8*int'(bpos) -: 8];
  end

  assign busy = ssu_busy || vu_busy || blk_pending || init_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_OP; op <= OP_INIT; argn <= '0; arg <= '0; fpos <= '0; fframe <= 1'b0;
      fhalf <= 1'b0; fhi <= '0;
      cfg <= '{am_offset: 32'd128, lm_offset: 32'd0, hmm_beam: 32'sd614000, word_beam: 32'sd307000,
               maxhmmpf: 32'd30000, maxwpf: 32'd20, max_n_best: 8'd10, feat_len: 8'(MAX_FEAT),
               hmm_len: 8'd3, max_mix: 8'd8};
      utt_id <= '0; utt_start <= 1'b0; pause <= 1'b0; init_start <= 1'b0; init_busy <= 1'b0;
      feat_we <= 1'b0; feat_frame <= 1'b0; feat_idx <= '0; feat_data <= '0;
      ssu_start <= 1'b0; ssu_bank <= 1'b0; vu_start <= 1'b0; vu_bank <= 1'b0; vu_fidx <= 1'b0;
      frame_no <= '0; lat_rd <= 1'b0; lat_clear <= 1'b0; n_overrun <= '0;
      blk_pending <= 1'b0; ssu_busy <= 1'b0; vu_busy <= 1'b0; ssu_started <= '0;
      vu_blocks <= '0; ssu_blocks <= '0; vu_f <= 1'b0; n_blocks_scored <= '0; n_frames_decoded <= '0;
      tx_mode <= 1'b0; tx_len <= '0; ent_left <= '0; bpos <= '0; hdr <= 1'b1; load_next <= 1'b0; load_d <= 1'b0;
      txbuf <= '0;
    end else begin
      utt_start <= 1'b0; init_start <= 1'b0; feat_we <= 1'b0; ssu_start <= 1'b0;
      vu_start <= 1'b0; lat_rd <= 1'b0; lat_clear <= 1'b0; load_next <= 1'b0;
      load_d <= load_next;

      // ---------------- command parser ----------------
      case (st)
        I_OP: if (rx_valid) begin
          op <= opcode_e'(rx_data);
          argn <= '0;
          case (rx_data)
            8'(OP_LOAD_FEATURE_BLOCK): begin
              fpos <= '0; fframe <= 1'b0; fhalf <= 1'b0;
              if (blk_pending) begin
                n_overrun <= n_overrun + 1;
                st <= I_SKIP;
              end else st <= (cfg.feat_len == 0) ? I_OP : I_FEAT;
            end
            8'(OP_READ_LATTICE): st <= I_RLEN;
            8'(OP_INIT):   begin init_start <= 1'b1; init_busy <= 1'b1; end
            8'(OP_PAUSE):  pause <= 1'b1;
            8'(OP_RESUME): pause <= 1'b0;
            default: if (rx_data >= 8'h01 && rx_data <= 8'h0D) st <= I_ARG; else st <= I_SKIP;
          endcase
        end
        I_ARG: if (rx_valid) begin
          automatic logic [31:0] v;
          v = {arg[23:0], rx_data};
          arg  <= v;
          argn <= argn + 1'b1;
          if (argn == 2'd3) begin
            st <= I_OP;
            case (op)
              OP_SET_ACOUSTIC_MODEL: cfg.am_offset  <= v;
              OP_SET_LANGUAGE_MODEL: cfg.lm_offset  <= v;
              OP_SET_HMM_INIT_BEAM:  cfg.hmm_beam   <= score_t'(v);
              OP_SET_WORD_INIT_BEAM: cfg.word_beam  <= score_t'(v);
              OP_SET_MAXHMMPF:       cfg.maxhmmpf   <= v;
              OP_SET_MAXWPF:         cfg.maxwpf     <= v;
              OP_SET_MAX_N_BEST:     cfg.max_n_best <= v[7:0];
              OP_SET_FEATURE_LENGTH: cfg.feat_len   <= (v > 32'(MAX_FEAT)) ? 8'(MAX_FEAT) : v[7:0];
              OP_SET_HMM_LENGTH:     cfg.hmm_len    <= v[7:0];
              OP_SET_MAX_MIXTURES:   cfg.max_mix    <= v[7:0];
              OP_SET_UTTERANCE_ID: begin
                utt_id <= v; utt_start <= 1'b1; lat_clear <= 1'b1;
                frame_no <= '0; ssu_started <= '0; ssu_blocks <= '0; vu_blocks <= '0;
                vu_f <= 1'b0; blk_pending <= 1'b0;
              end
              default: ;
            endcase
          end
        end
        I_FEAT: if (rx_valid) begin
          if (!fhalf) begin
            fhi <= rx_data; fhalf <= 1'b1;
          end else begin
            fhalf <= 1'b0;
            feat_we <= 1'b1; feat_frame <= fframe; feat_idx <= fpos[5:0];
            feat_data <= {fhi, rx_data};
            if (fpos + 1 == cfg.feat_len) begin
              fpos <= '0;
              fframe <= 1'b1;
              if (fframe) begin
                blk_pending <= 1'b1;
                st <= I_OP;
              end
            end else fpos <= fpos + 1'b1;
          end
        end
        I_RLEN: if (rx_valid) begin
          automatic logic [7:0] n;
          n = (lat_count > ($clog2(LAT_DEPTH)+1)'(255)) ? 8'd255 : 8'(lat_count);
          if (rx_data < n) n = rx_data;
          tx_len <= n; ent_left <= n; hdr <= 1'b1; bpos <= '0;
          tx_mode <= 1'b1;
          st <= I_TX;
        end
        I_TX: begin
          if (tx_take) begin
            if (hdr) begin
              hdr <= 1'b0;
              if (ent_left != 0) begin lat_rd <= 1'b1; load_next <= 1'b1; end
            end else if (bpos == 4'(LAT_BYTES - 1)) begin
              bpos <= '0;
              ent_left <= ent_left - 1'b1;
              if (ent_left > 1) begin lat_rd <= 1'b1; load_next <= 1'b1; end
              else txbuf <= '0;
            end else bpos <= bpos + 1'b1;
          end
          if (load_d) txbuf <= lat_entry;      // FIFO data valid the cycle after lat_rd
        end
        I_SKIP: ;
        default: st <= I_OP;
      endcase
      if (frame_end) begin
        st <= I_OP;
        tx_mode <= 1'b0;
      end

      // ---------------- SSU / VU scheduling ----------------
      if (init_done) init_busy <= 1'b0;
      if (!pause && !init_busy && blk_pending && !ssu_busy && !utt_start &&
          ssu_started - vu_blocks < 32'd2) begin
        ssu_start <= 1'b1;
        ssu_bank  <= ssu_started[0];
        ssu_busy  <= 1'b1;
        blk_pending <= 1'b0;
        ssu_started <= ssu_started + 1;
      end
      if (ssu_done) begin
        ssu_busy <= 1'b0;
        ssu_blocks <= ssu_blocks + 1;
        n_blocks_scored <= n_blocks_scored + 1;
      end
      if (!pause && !vu_busy && !vu_start && ssu_blocks > vu_blocks) begin
        vu_start <= 1'b1;
        vu_busy  <= 1'b1;
        vu_bank  <= vu_blocks[0];
        vu_fidx  <= vu_f;
        frame_no <= 16'({vu_blocks[14:0], vu_f});
      end
      if (vu_done) begin
        vu_busy <= 1'b0;
        n_frames_decoded <= n_frames_decoded + 1;
        if (vu_f) begin vu_f <= 1'b0; vu_blocks <= vu_blocks + 1; end
        else vu_f <= 1'b1;
      end
    end
  end
endmodule
