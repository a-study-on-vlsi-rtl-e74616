// hmm3_top: 60k-word continuous speech recognizer (HMM + n-gram) core.
//
// A GMM core computes, for blocks of up to 20 look-ahead frames, the log
// output probability of all 1987 tied HMM states from run-length-coded
// parameters streamed in over a dedicated port; results go to a double
// buffer. A Viterbi core with 8 transition paths then runs the beam search
// frame by frame on the finished bank, using on-chip n-gram and active node
// map caches in front of an external memory port, and emits word-end
// (trellis) records for the host to back-track. A sequencer overlaps the two
// cores (elastic pipeline). Feature extraction, the external SDRAM with its
// host-side level-2 cache, and the final back-track are outside this block.
//
// Ports:
//   start / done         one utterance of total_frames frames; lookahead sets
//                        the GMM block size (1..FRAMES)
//   cfg_*                init_node (first node), thr_init and margin (beam
//                        threshold start), lm_trigram, two-stage search
//                        settings (0 selects the defaults 100 / 1500 / 7)
//   feat_*               features, lookahead x 25 words per block, in order
//   sym_*                compressed GMM parameters, 1987 states per block
//   ext_*                Viterbi external memory (dictionary, n-gram lists,
//                        n-gram entries, active node map), one request per
//                        clock, responses tagged by ID, any latency
//   trl_*                trellis records to the host
//   events               per-clock event pulses (hmm_events_t)
// Structure and sizes follow the published third-generation chip; port
// protocols are this implementation's choice.
module hmm3_top
  import hmm_pkg::*;
#(
  parameter int FRAMES       = 20,
  parameter int STATES       = 1987,
  parameter int MIX          = 16,
  parameter int DIMS         = 25,
  parameter int PATHS        = 8,
  parameter int DEPTH        = 8192,
  parameter int NG_SETS      = 4096,
  parameter int MAP_IDX_W    = 13,
  parameter int TARGET       = 3000,
  parameter int TOP_N        = 100,
  parameter int DETAIL_N     = 1500,
  parameter int DETAIL_CYCLE = 7
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [15:0]               total_frames,
  input  logic [4:0]                lookahead,
  input  logic [NODE_W-1:0]         cfg_init_node,
  input  logic signed [SCORE_W-1:0] cfg_thr_init,
  input  logic [SCORE_W-1:0]        cfg_margin,
  input  logic                      cfg_trigram,
  input  logic [15:0]               cfg_top_n,
  input  logic [15:0]               cfg_detail_n,
  input  logic [7:0]                cfg_detail_cycle,
  output logic                      busy,
  output logic                      done,
  input  logic                      feat_valid,
  output logic                      feat_ready,
  input  logic signed [FEAT_W-1:0]  feat_data,
  input  logic                      sym_valid,
  output logic                      sym_ready,
  input  logic [SYM_W-1:0]          sym_data,
  input  logic                      sym_last,
  output logic                      ext_req_valid,
  input  logic                      ext_req_ready,
  output ext_req_t                  ext_req,
  input  logic                      ext_rsp_valid,
  input  ext_rsp_t                  ext_rsp,
  output logic                      trl_valid,
  input  logic                      trl_ready,
  output trellis_t                  trl_rec,
  output logic [TRL_W-1:0]          trl_idx,
  output logic signed [SCORE_W-1:0] thr,
  output logic [$clog2(DEPTH):0]    active_count,
  output hmm_events_t               events
);
  logic        gmm_start, gmm_done, gmm_bank, gmm_busy;
  logic [4:0]  gmm_nframes;
  logic        vit_init, vit_frame_start, vit_frame_done, vit_bank, vit_busy;
  logic [15:0] vit_frame_no;
  logic [4:0]  vit_col;
  logic        overlap, vit_wait;

  global_sequencer #(.FRAMES(FRAMES)) u_seq (
    .clk, .rst_n, .start, .total_frames, .lookahead,
    .gmm_start, .gmm_nframes, .gmm_bank, .gmm_done,
    .vit_init, .vit_frame_start, .vit_frame_no, .vit_bank, .vit_col, .vit_frame_done,
    .busy, .done, .overlap, .vit_wait
  );

  logic                    res_we;
  logic [STATE_W-1:0]      res_state;
  logic [FRAMES*GMM_W-1:0] res_row;
  logic                    mix_skip;

  gmm_core #(.FRAMES(FRAMES), .STATES(STATES), .MIX(MIX), .DIMS(DIMS)) u_gmm (
    .clk, .rst_n, .start(gmm_start), .nframes(gmm_nframes),
    .feat_valid, .feat_ready, .feat_data,
    .sym_valid, .sym_ready, .sym_data, .sym_last,
    .res_we, .res_state, .res_row, .busy(gmm_busy), .done(gmm_done), .mix_skip
  );

  logic                    rb_rd_bank;
  logic [STATE_W-1:0]      rb_rd_state;
  logic [4:0]              rb_rd_frame;
  logic signed [GMM_W-1:0] rb_rd_data;

  gmm_result_buffer #(.STATES(STATES), .FRAMES(FRAMES)) u_res (
    .clk, .wr_en(res_we), .wr_bank(gmm_bank), .wr_state(res_state), .wr_row(res_row),
    .rd_bank(rb_rd_bank), .rd_state(rb_rd_state), .rd_frame(rb_rd_frame), .rd_data(rb_rd_data)
  );

  viterbi_core #(
    .PATHS(PATHS), .DEPTH(DEPTH), .NG_SETS(NG_SETS), .MAP_IDX_W(MAP_IDX_W), .TOP_N(TOP_N),
    .DETAIL_N(DETAIL_N), .DETAIL_CYCLE(DETAIL_CYCLE), .TARGET(TARGET)
  ) u_vit (
    .clk, .rst_n,
    .init(vit_init), .init_node(cfg_init_node), .thr_init(cfg_thr_init), .margin(cfg_margin),
    .lm_trigram(cfg_trigram), .cfg_top_n, .cfg_detail_n, .cfg_detail_cycle,
    .frame_start(vit_frame_start), .frame_no(vit_frame_no), .gmm_bank(vit_bank), .gmm_col(vit_col),
    .frame_done(vit_frame_done), .active_count, .thr, .busy(vit_busy),
    .gmm_rd_bank(rb_rd_bank), .gmm_rd_state(rb_rd_state), .gmm_rd_frame(rb_rd_frame),
    .gmm_rd_data(rb_rd_data),
    .ext_req_valid, .ext_req_ready, .ext_req, .ext_rsp_valid, .ext_rsp,
    .trl_valid, .trl_ready, .trl_rec, .trl_idx,
    .ev_ng_hit(events.ng_hit), .ev_ng_miss(events.ng_miss), .ev_map_hit(events.map_hit),
    .ev_map_miss(events.map_miss), .ev_created(events.created), .ev_overwrite(events.overwrite),
    .ev_pruned(events.pruned), .ev_overflow(events.overflow), .ev_detail(events.detail_frame),
    .ev_trigram(events.trigram), .ev_hidden_miss(events.hidden_miss)
  );

  assign events.gmm_mix_skip = mix_skip;
  assign events.overlap      = overlap;
  assign events.vit_wait_gmm = vit_wait;
endmodule
