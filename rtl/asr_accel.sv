// Speech recognition accelerator, top level.
//
// Senone scoring and the first (N-best, bigram) decode pass of an HMM speech
// recogniser in hardware; the host CPU runs the front end and the second
// decode pass on the word lattice this block returns. Structure:
//
//   quad SPI -- qspi_slave -- icu (interface and control unit)
//                               |-- ssu  (senone score unit) --> senone_score_sram
//                               |-- vu   (Viterbi unit) <-------------'  |
//                               '-- lattice_buffer <--- word exits ------'
//
// The acoustic model NOR flash (768-bit lines), the language model NOR flash
// (256-bit lines) and the active list DRAM are outside this block; their
// ports are brought out. Both flash ports are request/response: *_req with
// *_addr (a line number) for one cycle, data on *_rvalid/*_rdata after the
// flash latency. The DRAM port takes one request per cycle and returns read
// data in order. stats gives event counters.
module asr_accel
  import asr_pkg::*;
#(
  parameter int NUM_SENONES = 8000,
  parameter int MAX_FEAT    = 39,
  parameter int LANES       = 4,
  parameter int SLOTS       = 16,
  parameter int LAT_DEPTH   = 1024,
  parameter int AL_MAX      = 65536
) (
  input  logic         clk,
  input  logic         rst_n,
  // host interface
  input  logic         sclk,
  input  logic         cs_n,
  input  logic [3:0]   io_in,
  output logic [3:0]   io_out,
  output logic         io_oe,
  // acoustic model NOR flash
  output logic         af_req,
  output logic [31:0]  af_addr,
  input  logic         af_rvalid,
  input  logic [767:0] af_rdata,
  // language model NOR flash
  output logic         vf_req,
  output logic [31:0]  vf_addr,
  input  logic         vf_rvalid,
  input  logic [255:0] vf_rdata,
  // active list DRAM
  output logic         dr_req,
  output logic         dr_we,
  output logic [31:0]  dr_addr,
  output al_entry_t    dr_wdata,
  input  logic         dr_rvalid,
  input  al_entry_t    dr_rdata,
  // status
  output logic         busy,
  output stats_t       stats
);
  localparam int SAW = $clog2(NUM_SENONES);

  logic       rx_valid, frame_end, tx_mode, tx_take;
  logic [7:0] rx_data, tx_data;
  qspi_slave u_spi (.clk, .rst_n, .sclk, .cs_n, .io_in, .io_out, .io_oe,
    .rx_valid, .rx_data, .frame_end, .tx_mode, .tx_data, .tx_take);

  cfg_t        cfg;
  logic [31:0] utt_id;
  logic        utt_start, pause, init_start, init_done, feat_we, feat_frame;
  logic [5:0]  feat_idx;
  logic signed [15:0] feat_data;
  logic        ssu_start, ssu_bank, ssu_done, vu_start, vu_bank, vu_fidx, vu_done;
  logic [15:0] frame_no;
  logic        lat_rd, lat_clear, lat_full, lat_wr;
  lattice_t    lat_rentry, lat_wentry;
  logic [$clog2(LAT_DEPTH):0] lat_count;
  logic [31:0] n_overrun, n_blocks, n_frames;

  icu #(.MAX_FEAT(MAX_FEAT), .LAT_DEPTH(LAT_DEPTH)) u_icu (
    .clk, .rst_n, .rx_valid, .rx_data, .frame_end, .tx_mode, .tx_data, .tx_take,
    .cfg, .utt_id, .utt_start, .pause, .init_start, .init_done,
    .feat_we, .feat_frame, .feat_idx, .feat_data,
    .ssu_start, .ssu_bank, .ssu_done, .vu_start, .vu_bank, .vu_fidx, .frame_no, .vu_done,
    .lat_rd, .lat_entry(lat_rentry), .lat_count, .lat_clear,
    .n_overrun, .n_blocks_scored(n_blocks), .n_frames_decoded(n_frames), .busy);

  logic           sc_we, sc_bank, sc_frame;
  logic [SAW-1:0] sc_addr;
  score_t         sc_data;
  logic [31:0]    n_scored;
  ssu #(.NUM_SENONES(NUM_SENONES), .MAX_FEAT(MAX_FEAT), .LANES(LANES), .LINE_W(768)) u_ssu (
    .clk, .rst_n, .utt_start, .start(ssu_start), .bank(ssu_bank), .lib_offset(cfg.am_offset),
    .pause, .done(ssu_done), .init_start, .init_done,
    .feat_we, .feat_frame, .feat_idx, .feat_data,
    .fl_req(af_req), .fl_addr(af_addr), .fl_rvalid(af_rvalid), .fl_rdata(af_rdata),
    .sc_we, .sc_bank, .sc_frame, .sc_addr, .sc_data, .n_scored);

  logic           sr_rd, sr_bank, sr_frame;
  logic [SAW-1:0] sr_addr;
  score_t         sr_data;
  senone_score_sram #(.NUM_SENONES(NUM_SENONES)) u_sram (
    .clk, .we(sc_we), .wbank(sc_bank), .wframe(sc_frame), .waddr(sc_addr), .wdata(sc_data),
    .rd(sr_rd), .rbank(sr_bank), .rframe(sr_frame), .raddr(sr_addr), .rdata(sr_data));

  logic [31:0] n_active, n_words, al_len, n_stall, n_pruned, n_prop, n_merged, n_hits, n_miss,
               n_modify, n_insert, n_capped, n_pages;
  score_t      hmm_thr, word_thr;
  vu #(.NUM_SENONES(NUM_SENONES), .SLOTS(SLOTS), .AL_MAX(AL_MAX)) u_vu (
    .clk, .rst_n, .cfg, .utt_start, .pause, .frame_start(vu_start), .bank(vu_bank), .fidx(vu_fidx),
    .frame_no, .frame_done(vu_done),
    .sr_rd, .sr_bank, .sr_frame, .sr_addr, .sr_data,
    .fl_req(vf_req), .fl_addr(vf_addr), .fl_rvalid(vf_rvalid), .fl_rdata(vf_rdata),
    .dr_req, .dr_we, .dr_addr, .dr_wdata, .dr_rvalid, .dr_rdata,
    .lat_wr, .lat_entry(lat_wentry), .lat_full,
    .n_active, .n_words, .al_len, .hmm_thr, .word_thr, .n_stall, .n_pruned,
    .n_propagated(n_prop), .n_merged, .n_cache_hits(n_hits), .n_cache_misses(n_miss),
    .n_modify, .n_insert, .n_capped, .n_dram_pages(n_pages));

  lattice_buffer #(.DEPTH(LAT_DEPTH)) u_lat (
    .clk, .rst_n, .clear(lat_clear), .wr(lat_wr), .wentry(lat_wentry), .full(lat_full),
    .rd(lat_rd), .rentry(lat_rentry), .count(lat_count));

  assign stats = '{blocks_scored: n_blocks, frames_decoded: n_frames, active: n_active,
                   words: n_words, stall_cycles: n_stall, pruned: n_pruned, propagated: n_prop,
                   merged: n_merged, cache_hits: n_hits, cache_misses: n_miss,
                   word_modify: n_modify, word_insert: n_insert, nbest_capped: n_capped,
                   dram_pages: n_pages, feature_overrun: n_overrun};
endmodule
