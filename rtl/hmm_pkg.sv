// hmm_pkg: widths, records and encodings shared by the recognizer.
//
// The numbers that come from the published design are the 20-bit node ID
// and the 8-bit n-gram score of an n-gram cache entry, the 32-bit GMM
// parameter word, 16 mixtures of 52 parameters per state, 25 feature
// dimensions, 1987 states and 20 look-ahead frames. Everything else here
// (score, trellis and word widths, the record layouts, the external memory
// request kinds) is this implementation's own choice.
package hmm_pkg;

  // ---------------- sizes ----------------
  localparam int NODE_W   = 20;   // HMM state-node ID (n-gram cache data field)
  localparam int LM_W     = 8;    // n-gram score in the cache
  localparam int NGID_W   = 24;   // bigram / trigram ID (4.0 M bigrams, 8.4 M trigrams)
  localparam int WORD_W   = 16;   // word ID (60,001 words)
  localparam int STATE_W  = 11;   // GMM state index (1987 states)
  localparam int SCORE_W  = 32;   // accumulated log score in the Viterbi core
  localparam int GMM_W    = 24;   // stored GMM log likelihood
  localparam int TRL_W    = 20;   // trellis record index
  localparam int FTAG_W   = 8;    // frame tag of an active node map entry
  localparam int FEAT_W   = 16;   // feature value
  localparam int PARAM_W  = 32;   // GMM parameter word
  localparam int SYM_W    = 18;   // compressed GMM symbol {tag, payload}
  localparam int EXT_AW   = 32;
  localparam int EXT_DW   = 64;
  localparam int EXT_IDW  = 4;

  localparam int NMIX     = 16;
  localparam int NDIM     = 25;
  localparam int PAR_PER_MIX   = 52;
  localparam int PAR_PER_STATE = NMIX * PAR_PER_MIX;  // 832

  // ---------------- compressed GMM parameter symbols ----------------
  typedef enum logic [1:0] {
    SYM_LOW = 2'b00,   // low half of a parameter; emits one parameter
    SYM_RUN = 2'b01,   // new top half for all following parameters
    SYM_LIT = 2'b10    // top half for the next parameter only
  } sym_tag_e;

  // ---------------- GMM processor operations ----------------
  typedef enum logic [2:0] {
    PE_NOP, PE_CLEAR, PE_MIX_START, PE_DIM, PE_MIX_END
  } pe_op_e;

  // ---------------- Viterbi records ----------------
  typedef struct packed {
    logic [NODE_W-1:0]         node;
    logic signed [SCORE_W-1:0] score;  // max_i(delta_{t-1}(i) + log a_ij + LM), emission added when expanded
    logic [TRL_W-1:0]          hist;   // trellis index of the last word end on this path
    logic [WORD_W-1:0]         word;   // last completed word (trigram predecessor)
  } anode_t;

  // Dictionary record of one state node, as read from external memory.
  typedef struct packed {
    logic [STATE_W-1:0]        state;    // GMM state of this node
    logic signed [15:0]        self_lp;  // log a_jj
    logic signed [15:0]        next_lp;  // log a_j,j+1 plus unigram difference of node j+1
    logic                      is_start; // first state of a word
    logic                      word_end;
    logic [WORD_W-1:0]         word_id;  // word ending at this node (valid if word_end)
  } node_info_t;                         // 61 bits

  // N-gram list of a word (or of a word pair in trigram mode).
  typedef struct packed {
    logic [NGID_W-1:0]         base;
    logic [15:0]               count;
  } word_info_t;

  // N-gram entry: destination start node and score (log prob = -score << LM_SHIFT)
  typedef struct packed {
    logic [NODE_W-1:0]         dest;
    logic [LM_W-1:0]           score;
  } ngram_t;
  localparam int LM_SHIFT = 4;

  // External active node map entry
  typedef struct packed {
    logic                      valid;
    logic [FTAG_W-1:0]         ftag;
    logic [12:0]               slot;
  } map_ext_t;

  typedef struct packed {
    logic [WORD_W-1:0]         word;
    logic signed [SCORE_W-1:0] score;
    logic [TRL_W-1:0]          hist;
    logic [15:0]               frame;
  } trellis_t;

  // A transition handed to a Viterbi path
  typedef struct packed {
    logic                      xword;   // cross-word: id is an n-gram ID
    logic [NGID_W-1:0]         id;      // destination node (internal) or n-gram ID (cross)
    logic                      dstart;  // destination is a start-state node
    logic signed [15:0]        add;     // transition log prob (internal)
    logic signed [SCORE_W-1:0] src;     // source score incl. emission
    logic [TRL_W-1:0]          hist;
    logic [WORD_W-1:0]         word;
  } vjob_t;

  // ---------------- external memory port ----------------
  typedef enum logic [2:0] {
    EXT_DICT   = 3'd0,  // addr = node,       rdata = node_info_t
    EXT_WORD   = 3'd1,  // addr = {pred,word} (trigram) or word, rdata = word_info_t
    EXT_NGRAM  = 3'd2,  // addr = n-gram ID,  rdata = ngram_t
    EXT_MAP_RD = 3'd3,  // addr = node,       rdata = map_ext_t
    EXT_MAP_WR = 3'd4,  // addr = node,       wdata = map_ext_t, no response
    EXT_WORD3  = 3'd5   // addr = {pred,word}, trigram list of the best predecessor
  } ext_kind_e;

  typedef struct packed {
    ext_kind_e             kind;
    logic [EXT_AW-1:0]     addr;
    logic [31:0]           wdata;
    logic [EXT_IDW-1:0]    id;
  } ext_req_t;

  typedef struct packed {
    logic [EXT_IDW-1:0]    id;
    logic [EXT_DW-1:0]     data;
  } ext_rsp_t;

  // Per-clock event pulses brought out of the top for profiling and tests.
  typedef struct packed {
    logic gmm_mix_skip;    // a mixture was cut short in every frame
    logic overlap;         // GMM and Viterbi cores busy in the same clock
    logic vit_wait_gmm;    // Viterbi idle, waiting for a GMM block
    logic ng_hit;
    logic ng_miss;
    logic map_hit;
    logic map_miss;
    logic created;
    logic overwrite;
    logic pruned;
    logic overflow;
    logic detail_frame;    // a detailed language model frame started
    logic trigram;         // a trigram list was used
    logic hidden_miss;     // a path waits on memory while another uses a cache
  } hmm_events_t;

  function automatic logic signed [SCORE_W-1:0] sat_add(input logic signed [SCORE_W-1:0] a,
                                                        input logic signed [SCORE_W-1:0] b);
    logic signed [SCORE_W:0] s;
    s = {a[SCORE_W-1], a} + {b[SCORE_W-1], b};
    if (s[SCORE_W] != s[SCORE_W-1])
      return s[SCORE_W] ? {1'b1, {(SCORE_W-1){1'b0}}} : {1'b0, {(SCORE_W-1){1'b1}}};
    return s[SCORE_W-1:0];
  endfunction

endpackage
