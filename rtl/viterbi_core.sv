// viterbi_core: time-synchronous Viterbi beam search with PATHS parallel
// transition paths.
//
// Per frame, every active node of the current workspace is expanded:
//   1. the node fetcher reads the node, fetches its dictionary record from
//      external memory and adds the GMM log likelihood of its state for this
//      frame (read from the GMM result buffer);
//   2. it queues the word-internal transitions: the self loop and, unless the
//      node ends a word, the step to the next node. The next-node log
//      probability already includes the unigram difference of the next node
//      (the modified unigram model), so internal and cross-word transitions
//      need the same single addition;
//   3. if the node ends a word it saves a trellis record (trellis_writer),
//      fetches the word's n-gram list and queues one cross-word transition
//      per entry. Two-stage language model search: only every cfg cycle-th
//      frame is a detailed frame that takes up to DETAIL_N entries; the other
//      frames take the first TOP_N (lists are stored best first). In trigram
//      mode the list of the pair (best predecessor word, word) is used, the
//      bigram list if that pair has none (simplified trigram).
// Queued transitions are handed to the first idle viterbi_path. Paths share
// one n-gram cache lookup, one updater and one external port per clock, so
// a path stalled on external memory does not stop the others. The shared
// updater owns the active node map cache and the next-frame workspace: it
// checks whether the destination is active, overwrites it if the new score
// is higher, or creates it. A map entry is written through to external
// memory. Being the only writer, it never creates a node twice from two
// paths. A created node is valid only if its workspace entry names it, so a
// stale map entry can at worst cost a duplicate node, never a lost one.
// Transitions below the threshold from threshold_calc are dropped at once
// (dynamic beam pruning); the threshold is recomputed after each frame.
//
// Control: init seeds node init_node with score 0 into workspace 0 and
// flushes the caches. frame_start runs one frame on GMM column gmm_col of
// bank gmm_bank; frame_done pulses when all its transitions are finished and
// the next threshold is known; active_count is then the size of the new
// frame. Events (ev_*) pulse for testing and profiling.
// Published: the 8 paths, the stage order, the cache organisations, the
// two-stage search defaults (7 / 100 / 1500), the modified unigram,
// the simplified trigram. This implementation's own: the record formats,
// the request/grant protocol, the external-memory interface and the frame-tag
// scheme of the map.
// Lint note: rst_n also appears in the "disable iff" of the assertion at the
// end of the file; that is a simulation check, not a synchronous use of the
// reset in logic, so the sync/async reset warning it causes is expected.
module viterbi_core
  import hmm_pkg::*;
#(
  parameter int PATHS        = 8,
  parameter int DEPTH        = 8192,
  parameter int NG_SETS      = 4096,
  parameter int MAP_IDX_W    = 13,
  parameter int TOP_N        = 100,
  parameter int DETAIL_N     = 1500,
  parameter int DETAIL_CYCLE = 7,
  parameter int TARGET       = 3000,
  parameter int JOBQ         = 8,
  parameter int WQ           = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // control
  input  logic                      init,
  input  logic [NODE_W-1:0]         init_node,
  input  logic signed [SCORE_W-1:0] thr_init,
  input  logic [SCORE_W-1:0]        margin,
  input  logic                      lm_trigram,
  input  logic [15:0]               cfg_top_n,        // 0: TOP_N
  input  logic [15:0]               cfg_detail_n,     // 0: DETAIL_N
  input  logic [7:0]                cfg_detail_cycle, // 0: DETAIL_CYCLE
  input  logic                      frame_start,
  input  logic [15:0]               frame_no,
  input  logic                      gmm_bank,
  input  logic [4:0]                gmm_col,
  output logic                      frame_done,
  output logic [$clog2(DEPTH):0]    active_count,
  output logic signed [SCORE_W-1:0] thr,
  output logic                      busy,
  // GMM result buffer read
  output logic                      gmm_rd_bank,
  output logic [STATE_W-1:0]        gmm_rd_state,
  output logic [4:0]                gmm_rd_frame,
  input  logic signed [GMM_W-1:0]   gmm_rd_data,
  // external memory
  output logic                      ext_req_valid,
  input  logic                      ext_req_ready,
  output ext_req_t                  ext_req,
  input  logic                      ext_rsp_valid,
  input  ext_rsp_t                  ext_rsp,
  // trellis output buffer
  output logic                      trl_valid,
  input  logic                      trl_ready,
  output trellis_t                  trl_rec,
  output logic [TRL_W-1:0]          trl_idx,
  // events
  output logic                      ev_ng_hit,
  output logic                      ev_ng_miss,
  output logic                      ev_map_hit,
  output logic                      ev_map_miss,
  output logic                      ev_created,
  output logic                      ev_overwrite,
  output logic                      ev_pruned,
  output logic                      ev_overflow,
  output logic                      ev_detail,
  output logic                      ev_trigram,
  output logic                      ev_hidden_miss
);
  localparam int AW    = $clog2(DEPTH);
  localparam int CNT_W = AW + 1;
  localparam int PW    = (PATHS > 1) ? $clog2(PATHS) : 1;
  localparam int SUM_W = 48;
  localparam int NREQ  = PATHS + 1;       // external requesters besides the write queue
  localparam logic [EXT_IDW-1:0] FETCH_ID = EXT_IDW'(PATHS);

  // ------------------------------------------------------------------
  // workspaces, caches, threshold, trellis
  // ------------------------------------------------------------------
  typedef enum logic [4:0] {F_IDLE, F_RD, F_RDW, F_DICT, F_DICTW, F_GMM, F_GMMW, F_SELF,
                            F_NEXT, F_TRL, F_WORD, F_WORDW, F_XW, F_ADV, F_DRAIN, F_THR,
                            F_INIT} fstate_e;
  fstate_e           fs;
  logic             cur_bank;
  logic [CNT_W-1:0] cur_cnt, nxt_cnt;
  logic signed [SUM_W-1:0] nxt_sum;
  logic [FTAG_W-1:0] ftag_nxt;

  logic     ws_we, ws_wbank;
  logic [AW-1:0] ws_waddr, ws_raddr, ws_rbaddr;
  anode_t   ws_wdata, ws_rdata, ws_rbdata;

  active_node_workspace #(.DEPTH(DEPTH)) u_ws (
    .clk, .wr_en(ws_we), .wr_bank(ws_wbank), .wr_addr(ws_waddr), .wr_data(ws_wdata),
    .rd_bank(cur_bank), .rd_addr(ws_raddr), .rd_data(ws_rdata),
    .rdb_bank(!cur_bank), .rdb_addr(ws_rbaddr), .rdb_data(ws_rbdata)
  );

  logic              ng_lk_valid, ng_lk_done, ng_lk_hit, ng_fill_en;
  logic [NGID_W-1:0] ng_lk_id, ng_fill_id;
  logic [NODE_W-1:0] ng_lk_dest;
  logic [LM_W-1:0]   ng_lk_score;
  ngram_t            ng_fill_data;

  ngram_cache #(.SETS(NG_SETS)) u_ng (
    .clk, .rst_n, .flush(init),
    .lk_valid(ng_lk_valid), .lk_id(ng_lk_id), .lk_done(ng_lk_done), .lk_hit(ng_lk_hit),
    .lk_dest(ng_lk_dest), .lk_score(ng_lk_score),
    .fill_en(ng_fill_en), .fill_id(ng_fill_id), .fill_dest(ng_fill_data.dest),
    .fill_score(ng_fill_data.score), .hit_pulse(ev_ng_hit), .miss_pulse(ev_ng_miss)
  );

  logic              mc_hit, mc_we, mc_wstart;
  logic [NODE_W-1:0] mc_node, mc_wnode;
  logic              mc_start;
  logic [FTAG_W-1:0] mc_ftag, mc_wftag;
  logic [12:0]       mc_slot, mc_wslot;

  node_map_cache #(.IDX_W(MAP_IDX_W), .SLOT_W(13)) u_map (
    .clk, .rst_n, .flush(init),
    .lk_node(mc_node), .lk_start(mc_start), .lk_hit(mc_hit), .lk_ftag(mc_ftag), .lk_slot(mc_slot),
    .wr_en(mc_we), .wr_node(mc_wnode), .wr_start(mc_wstart), .wr_ftag(mc_wftag), .wr_slot(mc_wslot)
  );

  logic thr_frame_end, thr_ready;
  logic signed [SCORE_W-1:0] thr_avg;

  threshold_calc #(.TARGET(TARGET), .CNT_W(CNT_W), .SUM_W(SUM_W)) u_thr (
    .clk, .rst_n, .init, .thr_init, .margin,
    .frame_end(thr_frame_end), .count(nxt_cnt), .score_sum(nxt_sum),
    .thr, .avg(thr_avg), .ready(thr_ready)
  );

  logic             tw_valid, tw_ready;
  trellis_t         tw_rec;
  logic [TRL_W-1:0] tw_idx;

  trellis_writer u_trl (
    .clk, .rst_n, .init,
    .in_valid(tw_valid), .in_ready(tw_ready), .in_rec(tw_rec), .in_idx(tw_idx),
    .out_valid(trl_valid), .out_ready(trl_ready), .out_rec(trl_rec), .out_idx(trl_idx)
  );

  // ------------------------------------------------------------------
  // job queue
  // ------------------------------------------------------------------
  vjob_t              jq [JOBQ];
  logic [$clog2(JOBQ):0] jq_wp, jq_rp;
  logic               jq_push, jq_pop, jq_full, jq_empty;
  vjob_t              jq_in;
  localparam int JW = $clog2(JOBQ);

  assign jq_empty = (jq_wp == jq_rp);
  assign jq_full  = (jq_wp[JW-1:0] == jq_rp[JW-1:0]) && (jq_wp[JW] != jq_rp[JW]);

  always_ff @(posedge clk) if (jq_push && !jq_full) jq[jq_wp[JW-1:0]] <= jq_in;

  // ------------------------------------------------------------------
  // paths
  // ------------------------------------------------------------------
  logic [PATHS-1:0] p_job_valid, p_job_ready, p_ng_req, p_ng_gnt, p_ng_fill;
  logic [PATHS-1:0] p_ext_req, p_ext_gnt, p_ext_rsp, p_up_req, p_up_gnt, p_up_done, p_up_miss;
  logic [PATHS-1:0] p_up_start, p_up_fill, p_pruned, p_busy, p_wait;
  logic [NGID_W-1:0] p_ng_id [PATHS];
  ngram_t            p_ng_fill_data [PATHS];
  ext_kind_e         p_ext_kind [PATHS];
  logic [EXT_AW-1:0] p_ext_addr [PATHS];
  logic [NODE_W-1:0] p_up_node [PATHS];
  logic signed [SCORE_W-1:0] p_up_score [PATHS];
  logic [TRL_W-1:0]  p_up_hist [PATHS];
  logic [WORD_W-1:0] p_up_word [PATHS];
  map_ext_t          p_up_fill_data [PATHS];

  // dispatch: head of the queue to the lowest idle path
  always_comb begin
    p_job_valid = '0;
    jq_pop      = 1'b0;
    for (int i = 0; i < PATHS; i++)
      if (!jq_empty && !jq_pop && p_job_ready[i]) begin
        p_job_valid[i] = 1'b1;
        jq_pop         = 1'b1;
      end
  end

  for (genvar i = 0; i < PATHS; i++) begin : g_path
    viterbi_path u_path (
      .clk, .rst_n,
      .job_valid(p_job_valid[i]), .job_ready(p_job_ready[i]), .job(jq[jq_rp[JW-1:0]]), .thr,
      .ng_req(p_ng_req[i]), .ng_id(p_ng_id[i]), .ng_gnt(p_ng_gnt[i]),
      .ng_hit(ng_lk_hit), .ng_dest(ng_lk_dest), .ng_score(ng_lk_score),
      .ng_fill(p_ng_fill[i]), .ng_fill_data(p_ng_fill_data[i]),
      .ext_req(p_ext_req[i]), .ext_kind(p_ext_kind[i]), .ext_addr(p_ext_addr[i]),
      .ext_gnt(p_ext_gnt[i]), .ext_rsp_valid(p_ext_rsp[i]), .ext_rsp_data(ext_rsp.data),
      .up_req(p_up_req[i]), .up_node(p_up_node[i]), .up_start(p_up_start[i]),
      .up_score(p_up_score[i]), .up_hist(p_up_hist[i]), .up_word(p_up_word[i]),
      .up_fill(p_up_fill[i]), .up_fill_data(p_up_fill_data[i]),
      .up_gnt(p_up_gnt[i]), .up_done(p_up_done[i]), .up_miss(p_up_miss[i]),
      .pruned(p_pruned[i]), .busy(p_busy[i]), .waiting(p_wait[i])
    );
    assign p_ext_rsp[i] = ext_rsp_valid && ext_rsp.id == EXT_IDW'(i);
  end

  assign ev_pruned = |p_pruned;
  // a path waits on external memory while another path uses a cache

  // n-gram cache port
  logic [PW-1:0] ng_gi;
  logic          ng_any;
  rr_arbiter #(.N(PATHS)) u_ng_arb (
    .clk, .rst_n, .req(p_ng_req), .accept(1'b1), .gnt(p_ng_gnt), .gnt_idx(ng_gi), .any(ng_any)
  );
  assign ng_lk_valid = ng_any;
  assign ng_lk_id    = p_ng_id[ng_gi];

  always_comb begin
    ng_fill_en   = 1'b0;
    ng_fill_id   = '0;
    ng_fill_data = '0;
    for (int i = 0; i < PATHS; i++)
      if (p_ng_fill[i]) begin
        ng_fill_en = 1'b1; ng_fill_id = p_ng_id[i]; ng_fill_data = p_ng_fill_data[i];
      end
  end

  // ------------------------------------------------------------------
  // external port: map write queue first, then paths and fetcher in turn
  // ------------------------------------------------------------------
  logic [NODE_W-1:0] wq_node [WQ];
  map_ext_t          wq_data [WQ];
  logic [$clog2(WQ):0] wq_wp, wq_rp, wq_cnt;
  logic              wq_push;
  logic [NODE_W-1:0] wq_in_node;
  map_ext_t          wq_in_data;
  localparam int WW = $clog2(WQ);
  assign wq_cnt = wq_wp - wq_rp;

  always_ff @(posedge clk) if (wq_push) begin
    wq_node[wq_wp[WW-1:0]] <= wq_in_node;
    wq_data[wq_wp[WW-1:0]] <= wq_in_data;
  end

  logic              f_ext_req;
  ext_kind_e         f_ext_kind;
  logic [EXT_AW-1:0] f_ext_addr;
  logic [NREQ-1:0]   x_req, x_gnt;
  logic [$clog2(NREQ)-1:0] x_gi;
  logic              x_any, wq_go;

  assign wq_go = (wq_cnt != 0);
  assign x_req = {f_ext_req, p_ext_req};
  rr_arbiter #(.N(NREQ)) u_x_arb (
    .clk, .rst_n, .req(x_req), .accept(ext_req_ready && !wq_go), .gnt(x_gnt), .gnt_idx(x_gi), .any(x_any)
  );

  always_comb begin
    ext_req_valid = wq_go || x_any;
    ext_req       = '0;
    if (wq_go) begin
      ext_req.kind  = EXT_MAP_WR;
      ext_req.addr  = EXT_AW'(wq_node[wq_rp[WW-1:0]]);
      ext_req.wdata = 32'(wq_data[wq_rp[WW-1:0]]);
      ext_req.id    = '1;
    end else if (x_gi == ($clog2(NREQ))'(PATHS)) begin
      ext_req.kind = f_ext_kind;
      ext_req.addr = f_ext_addr;
      ext_req.id   = FETCH_ID;
    end else begin
      ext_req.kind = p_ext_kind[x_gi[PW-1:0]];
      ext_req.addr = p_ext_addr[x_gi[PW-1:0]];
      ext_req.id   = EXT_IDW'(x_gi);
    end
  end
  assign p_ext_gnt = (ext_req_ready && !wq_go) ? x_gnt[PATHS-1:0] : '0;
  logic f_ext_gnt, f_ext_rsp;
  assign f_ext_gnt = ext_req_ready && !wq_go && x_gnt[PATHS];
  assign f_ext_rsp = ext_rsp_valid && ext_rsp.id == FETCH_ID;

  // ------------------------------------------------------------------
  // updater: map lookup, compare, create / overwrite
  // ------------------------------------------------------------------
  typedef enum logic {U_IDLE, U_B} ustate_e;
  ustate_e           us;
  logic [PATHS-1:0]  up_gnt_c;
  logic [PW-1:0]     up_gi;
  logic              up_any, up_take;
  logic [PW-1:0]     u_path;
  logic [NODE_W-1:0] u_node;
  logic              u_start;
  logic signed [SCORE_W-1:0] u_score;
  logic [TRL_W-1:0]  u_hist;
  logic [WORD_W-1:0] u_word;
  logic              u_hint;
  logic [12:0]       u_slot;

  assign up_take = (us == U_IDLE) && up_any && (wq_cnt < ($clog2(WQ)+1)'(WQ-1));
  rr_arbiter #(.N(PATHS)) u_up_arb (
    .clk, .rst_n, .req(p_up_req), .accept(up_take), .gnt(up_gnt_c), .gnt_idx(up_gi), .any(up_any)
  );
  assign p_up_gnt = up_take ? up_gnt_c : '0;
  assign ev_hidden_miss = (|p_wait) && (ng_lk_valid || up_take);

  // lookup for the request being granted
  assign mc_node  = p_up_node[up_gi];
  assign mc_start = p_up_start[up_gi];

  logic              g_hit_line, g_present;
  logic [12:0]       g_slot;
  always_comb begin
    g_hit_line = mc_hit;
    g_present  = mc_hit && (mc_ftag == ftag_nxt);
    g_slot     = mc_slot;
    if (p_up_fill[up_gi] && !mc_hit) begin
      g_hit_line = 1'b1;
      g_present  = p_up_fill_data[up_gi].valid && (p_up_fill_data[up_gi].ftag == ftag_nxt);
      g_slot     = p_up_fill_data[up_gi].slot;
    end
  end
  assign ws_rbaddr = AW'(g_slot);

  logic          u_present;
  logic          u_create;
  assign u_present = u_hint && (CNT_W'(u_slot) < nxt_cnt) && (ws_rbdata.node == u_node);
  assign u_create  = (us == U_B) && !u_present && (nxt_cnt < CNT_W'(DEPTH));

  always_comb begin
    mc_we = 1'b0; mc_wnode = u_node; mc_wstart = u_start; mc_wftag = ftag_nxt; mc_wslot = u_slot;
    ws_we = 1'b0; ws_wbank = !cur_bank; ws_waddr = AW'(u_slot);
    ws_wdata = '{node: u_node, score: u_score, hist: u_hist, word: u_word};
    wq_push = 1'b0; wq_in_node = u_node; wq_in_data = '{valid: 1'b1, ftag: ftag_nxt, slot: 13'(nxt_cnt)};
    if (up_take && p_up_fill[up_gi] && !mc_hit) begin
      // install the fetched map entry
      mc_we     = 1'b1;
      mc_wnode  = mc_node;
      mc_wstart = mc_start;
      mc_wftag  = p_up_fill_data[up_gi].valid ? p_up_fill_data[up_gi].ftag : ftag_nxt - 1'b1;
      mc_wslot  = p_up_fill_data[up_gi].slot;
    end
    if (fs == F_INIT) begin
      // seed the first frame: workspace 0, slot 0 (the updater is idle)
      ws_we    = 1'b1;
      ws_wbank = 1'b0;
      ws_waddr = '0;
      ws_wdata = '{node: init_node, score: '0, hist: '1, word: '0};
    end
    if (us == U_B) begin
      if (u_present) begin
        ws_we = (u_score > ws_rbdata.score);
      end else if (u_create) begin
        ws_we     = 1'b1;
        ws_waddr  = AW'(nxt_cnt);
        mc_we     = 1'b1;
        mc_wslot  = 13'(nxt_cnt);
        wq_push   = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us <= U_IDLE; u_path <= '0; u_node <= '0; u_start <= 1'b0; u_score <= '0; u_hist <= '0;
      u_word <= '0; u_hint <= 1'b0; u_slot <= '0;
      p_up_done <= '0; p_up_miss <= '0;
      ev_map_hit <= 1'b0; ev_map_miss <= 1'b0; ev_created <= 1'b0; ev_overwrite <= 1'b0;
      ev_overflow <= 1'b0;
    end else begin
      p_up_done <= '0; p_up_miss <= '0;
      ev_map_hit <= 1'b0; ev_map_miss <= 1'b0; ev_created <= 1'b0; ev_overwrite <= 1'b0;
      ev_overflow <= 1'b0;
      unique case (us)
        U_IDLE: if (up_take) begin
          if (g_hit_line) begin
            u_path  <= up_gi;
            u_node  <= p_up_node[up_gi];
            u_start <= p_up_start[up_gi];
            u_score <= p_up_score[up_gi];
            u_hist  <= p_up_hist[up_gi];
            u_word  <= p_up_word[up_gi];
            u_hint  <= g_present;
            u_slot  <= g_slot;
            us      <= U_B;
            ev_map_hit <= !p_up_fill[up_gi];
          end else begin
            p_up_miss[up_gi] <= 1'b1;
            ev_map_miss      <= 1'b1;
          end
        end
        U_B: begin
          p_up_done[u_path] <= 1'b1;
          ev_overwrite <= u_present && (u_score > ws_rbdata.score);
          ev_created   <= u_create;
          ev_overflow  <= !u_present && !u_create;
          us <= U_IDLE;
        end
        default: us <= U_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // node fetcher and frame control
  // ------------------------------------------------------------------
  logic [CNT_W-1:0]  fk;
  anode_t            fnode;
  node_info_t        finfo;
  logic signed [SCORE_W-1:0] fsrc;
  logic [TRL_W-1:0]  fhist;
  logic              fword3;       // current list request is the trigram one
  word_info_t        fwi;
  word_info_t        wi;      // word record arriving from the external port
  assign wi = word_info_t'(ext_rsp.data[$bits(word_info_t)-1:0]);
  logic [15:0]       fxi, fxn;
  logic [7:0]        phase;
  logic              detailed;
  logic [15:0]       top_n, detail_n;
  logic [7:0]        dcycle;
  logic              all_idle;
  logic [15:0]       fframe;
  logic              fbank;
  logic [4:0]        fcol;

  assign top_n    = (cfg_top_n    != 0) ? cfg_top_n    : 16'(TOP_N);
  assign detail_n = (cfg_detail_n != 0) ? cfg_detail_n : 16'(DETAIL_N);
  assign dcycle   = (cfg_detail_cycle != 0) ? cfg_detail_cycle : 8'(DETAIL_CYCLE);
  assign detailed = (phase == 8'd0);
  assign ftag_nxt = fframe[FTAG_W-1:0] + 1'b1;

  assign ws_raddr     = AW'(fk);
  assign gmm_rd_bank  = fbank;
  assign gmm_rd_state = finfo.state;
  assign gmm_rd_frame = fcol;
  assign f_ext_req    = (fs == F_DICT) || (fs == F_WORD);
  assign f_ext_kind   = (fs == F_DICT) ? EXT_DICT : (fword3 ? EXT_WORD3 : EXT_WORD);
  assign f_ext_addr   = (fs == F_DICT) ? EXT_AW'(fnode.node)
                      : (fword3 ? {fnode.word, finfo.word_id} : EXT_AW'(finfo.word_id));
  assign tw_valid     = (fs == F_TRL);
  assign tw_rec       = '{word: finfo.word_id, score: fsrc, hist: fnode.hist, frame: fframe};
  assign all_idle     = jq_empty && !(|p_busy) && (us == U_IDLE) && (wq_cnt == 0) &&
                        !(|p_up_done) && !(|p_up_miss);
  assign thr_frame_end = (fs == F_DRAIN) && all_idle;
  assign busy         = (fs != F_IDLE);
  assign active_count = cur_cnt;

  always_comb begin
    jq_push = 1'b0;
    jq_in   = '{xword: 1'b0, id: NGID_W'(fnode.node), dstart: finfo.is_start,
                add: finfo.self_lp, src: fsrc, hist: fnode.hist, word: fnode.word};
    unique case (fs)
      F_SELF: jq_push = 1'b1;
      F_NEXT: begin
        jq_push   = !finfo.word_end;
        jq_in.id  = NGID_W'(fnode.node + 1'b1);
        jq_in.add = finfo.next_lp;
        jq_in.dstart = 1'b0;
      end
      F_XW: begin
        jq_push      = (fxi < fxn);
        jq_in.xword  = 1'b1;
        jq_in.id     = fwi.base + NGID_W'(fxi);
        jq_in.add    = '0;
        jq_in.dstart = 1'b1;
        jq_in.hist   = fhist;
        jq_in.word   = finfo.word_id;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs <= F_IDLE; fk <= '0; fnode <= '0; finfo <= '0; fsrc <= '0; fhist <= '0; fword3 <= 1'b0;
      fwi <= '0; fxi <= '0; fxn <= '0; phase <= '0; fframe <= '0; fbank <= 1'b0; fcol <= '0;
      cur_bank <= 1'b0; cur_cnt <= '0; nxt_cnt <= '0; nxt_sum <= '0;
      jq_wp <= '0; jq_rp <= '0; wq_wp <= '0; wq_rp <= '0;
      frame_done <= 1'b0; ev_detail <= 1'b0; ev_trigram <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      ev_detail  <= 1'b0;
      ev_trigram <= 1'b0;
      if (jq_push && !jq_full) jq_wp <= jq_wp + 1'b1;
      if (jq_pop) jq_rp <= jq_rp + 1'b1;
      if (wq_push) wq_wp <= wq_wp + 1'b1;
      if (wq_go && ext_req_ready) wq_rp <= wq_rp + 1'b1;
      // next-frame statistics kept by the updater
      if (us == U_B) begin
        if (u_present && u_score > ws_rbdata.score)
          nxt_sum <= nxt_sum + SUM_W'(u_score) - SUM_W'(ws_rbdata.score);
        else if (u_create) begin
          nxt_sum <= nxt_sum + SUM_W'(u_score);
          nxt_cnt <= nxt_cnt + 1'b1;
        end
      end
      unique case (fs)
        F_IDLE: begin
          if (init) fs <= F_INIT;
          else if (frame_start) begin
            fframe <= frame_no; fbank <= gmm_bank; fcol <= gmm_col; fk <= '0;
            ev_detail <= detailed;
            fs <= (cur_cnt == 0) ? F_DRAIN : F_RD;
          end
        end
        F_INIT: begin   // seed the first frame
          cur_bank <= 1'b0; cur_cnt <= CNT_W'(1); nxt_cnt <= '0; nxt_sum <= '0; phase <= '0;
          fs <= F_IDLE;
        end
        F_RD:   fs <= F_RDW;
        F_RDW:  begin fnode <= ws_rdata; fs <= F_DICT; end
        F_DICT: if (f_ext_gnt) fs <= F_DICTW;
        F_DICTW: if (f_ext_rsp) begin
          finfo <= node_info_t'(ext_rsp.data[$bits(node_info_t)-1:0]);
          fs    <= F_GMM;
        end
        F_GMM:  fs <= F_GMMW;
        F_GMMW: begin
          fsrc <= sat_add(fnode.score, SCORE_W'(gmm_rd_data));
          fs   <= F_SELF;
        end
        F_SELF: if (!jq_full) fs <= F_NEXT;
        F_NEXT: if (!jq_full) fs <= finfo.word_end ? F_TRL : F_ADV;
        F_TRL:  if (tw_ready) begin
          fhist  <= tw_idx;
          fword3 <= lm_trigram;
          fs     <= F_WORD;
        end
        F_WORD:  if (f_ext_gnt) fs <= F_WORDW;
        F_WORDW: if (f_ext_rsp) begin
          if (fword3 && wi.count == 0) begin
            fword3 <= 1'b0;            // no trigram list: fall back to bigram
            fs     <= F_WORD;
          end else begin
            fwi <= wi;
            fxi <= '0;
            fxn <= (wi.count < (detailed ? detail_n : top_n)) ? wi.count
                                                              : (detailed ? detail_n : top_n);
            ev_trigram <= fword3;
            fs  <= F_XW;
          end
        end
        F_XW: begin
          if (fxi >= fxn) fs <= F_ADV;
          else if (!jq_full) fxi <= fxi + 1'b1;
        end
        F_ADV: begin
          if (fk + 1'b1 == cur_cnt) fs <= F_DRAIN;
          else begin fk <= fk + 1'b1; fs <= F_RD; end
        end
        F_DRAIN: if (all_idle) fs <= F_THR;
        F_THR: if (thr_ready) begin
          cur_bank <= !cur_bank;
          cur_cnt  <= nxt_cnt;
          nxt_cnt  <= '0;
          nxt_sum  <= '0;
          phase    <= (phase + 8'd1 >= dcycle) ? 8'd0 : phase + 8'd1;
          frame_done <= 1'b1;
          fs <= F_IDLE;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

  // at most one path refills the n-gram cache per clock (one response per clock)
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(p_ng_fill));
endmodule
