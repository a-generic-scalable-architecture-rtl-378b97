// Shared types and constants of the speech recognition accelerator.
//
// All probabilities are kept as 32-bit signed log values (log base 1.0003,
// larger is better). NEG_INF marks an impossible path: saturating adds keep
// it sticky so that an unreached HMM state never becomes reachable by
// accident. The active-list entry, the word lattice entry and the
// configuration register set are defined here because the control unit, the
// Viterbi unit, the lattice buffer and the DRAM controller all pass them
// around. Field widths are this design's choice: 16-bit word IDs cover the
// 64K-word vocabulary, 16-bit frame numbers cover utterances of 655 s.
package asr_pkg;

  typedef logic signed [31:0] score_t;

  localparam score_t NEG_INF   = -32'sd1073741824;  // -2^30
  localparam score_t SCORE_MAX =  32'sd1073741823;

  // Saturating add of two log scores; NEG_INF on either side stays NEG_INF.
  function automatic score_t sadd(input score_t a, input score_t b);
    logic signed [33:0] s;
    if (a <= NEG_INF || b <= NEG_INF) return NEG_INF;
    s = 34'(a) + 34'(b);
    if (s <= 34'(NEG_INF)) return NEG_INF;
    if (s >= 34'(SCORE_MAX)) return SCORE_MAX;
    return score_t'(s);
  endfunction

  function automatic score_t smax(input score_t a, input score_t b);
    return (a > b) ? a : b;
  endfunction

  // One active HMM instance (an active-list entry in DRAM).
  typedef struct packed {
    logic [15:0] word;         // word ID
    logic [15:0] pred;         // predecessor word ID (path of the N-best search)
    logic [3:0]  hmm;          // position of the HMM inside the word
    logic [15:0] start_frame;  // frame the word was entered
    logic [15:0] hmm_start;    // frame this HMM was entered
    score_t      in_score;     // left-context score for the next frame
    score_t      st0;
    score_t      st1;
    score_t      st2;
  } al_entry_t;

  localparam int AL_W = $bits(al_entry_t);

  // One word lattice node (first decode pass output).
  typedef struct packed {
    logic [15:0] word;
    logic [15:0] pred;
    score_t      score;
    logic [15:0] start_frame;
    logic [15:0] last_start;
    logic [15:0] last_end;
  } lattice_t;

  localparam int LAT_W = $bits(lattice_t);
  localparam int LAT_BYTES = LAT_W / 8;  // 14

  // Configuration registers written by the SET_* commands.
  typedef struct packed {
    logic [31:0] am_offset;    // acoustic library line offset
    logic [31:0] lm_offset;    // language model line offset
    score_t      hmm_beam;     // initial HMM beam (positive width)
    score_t      word_beam;    // initial word exit beam
    logic [31:0] maxhmmpf;
    logic [31:0] maxwpf;
    logic [7:0]  max_n_best;
    logic [7:0]  feat_len;
    logic [7:0]  hmm_len;
    logic [7:0]  max_mix;
  } cfg_t;

  typedef enum logic [7:0] {
    OP_SET_ACOUSTIC_MODEL = 8'h01,
    OP_SET_LANGUAGE_MODEL = 8'h02,
    OP_SET_HMM_INIT_BEAM  = 8'h03,
    OP_SET_WORD_INIT_BEAM = 8'h04,
    OP_SET_MAXHMMPF       = 8'h05,
    OP_SET_MAXWPF         = 8'h06,
    OP_SET_MAX_N_BEST     = 8'h07,
    OP_SET_FEATURE_LENGTH = 8'h08,
    OP_SET_HMM_LENGTH     = 8'h09,
    OP_SET_MAX_MIXTURES   = 8'h0A,
    OP_LOAD_FEATURE_BLOCK = 8'h0B,
    OP_READ_LATTICE       = 8'h0C,
    OP_SET_UTTERANCE_ID   = 8'h0D,
    OP_INIT               = 8'h0E,
    OP_PAUSE              = 8'h0F,
    OP_RESUME             = 8'h10
  } opcode_e;

  // Language model line layout (256-bit NOR flash lines).
  localparam int WORD_MAX_HMMS = 12;   // HMM IDs in one word line
  localparam int BG_PER_LINE   = 7;    // bigram pairs in one line

  // Event counters brought out of the top for monitoring.
  typedef struct packed {
    logic [31:0] blocks_scored;
    logic [31:0] frames_decoded;
    logic [31:0] active;          // HMMs kept in the last frame
    logic [31:0] words;           // lattice words in the last frame
    logic [31:0] stall_cycles;    // VU stalled on a full lattice
    logic [31:0] pruned;
    logic [31:0] propagated;
    logic [31:0] merged;
    logic [31:0] cache_hits;
    logic [31:0] cache_misses;
    logic [31:0] word_modify;
    logic [31:0] word_insert;
    logic [31:0] nbest_capped;
    logic [31:0] dram_pages;
    logic [31:0] feature_overrun;
  } stats_t;

  typedef enum logic [1:0] {SEL_WORD = 2'd0, SEL_HMM = 2'd1, SEL_BIGRAM = 2'd2} vsel_e;

endpackage
