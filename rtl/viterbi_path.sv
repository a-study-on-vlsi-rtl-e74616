// viterbi_path: one transition path of the multi-path Viterbi unit.
//
// A path carries one transition from start to end:
//   N-gram  (cross-word only) look up the n-gram cache for the destination
//           start node and the language score; on a miss, fetch the entry
//           from external memory and refill the cache;
//   ADD     score = source score + transition log prob (word-internal) or
//           source score - (n-gram score << LM_SHIFT) (cross-word);
//   CMP     drop the transition if the score is below the beam threshold;
//   update  hand the score to the shared updater, which looks up the active
//           node map, compares with an existing node and creates or
//           overwrites it; if the map line is not cached, read the map entry
//           from external memory and hand it over again with the entry.
// The n-gram cache, the updater and the external port are shared by all
// paths and granted one path per clock. A path that waits for external
// memory holds only itself: the other paths keep using the caches, which is
// how several paths hide the miss latency (the published 4/8-path scheme).
// Stage order follows the published pipeline; the request/grant protocol is
// this implementation's.
//
// Timing: job taken when job_valid && job_ready (path idle). Cache result
// comes the clock after ng_gnt; external response whenever ext_rsp_valid
// (routed to this path by ID); updater answer (up_done or up_miss) some
// clocks after up_gnt.
module viterbi_path
  import hmm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // job
  input  logic                      job_valid,
  output logic                      job_ready,
  input  vjob_t                     job,
  input  logic signed [SCORE_W-1:0] thr,
  // n-gram cache
  output logic                      ng_req,
  output logic [NGID_W-1:0]         ng_id,
  input  logic                      ng_gnt,
  input  logic                      ng_hit,
  input  logic [NODE_W-1:0]         ng_dest,
  input  logic [LM_W-1:0]           ng_score,
  output logic                      ng_fill,
  output ngram_t                    ng_fill_data,
  // external memory
  output logic                      ext_req,
  output ext_kind_e                 ext_kind,
  output logic [EXT_AW-1:0]         ext_addr,
  input  logic                      ext_gnt,
  input  logic                      ext_rsp_valid,
  input  logic [EXT_DW-1:0]         ext_rsp_data,
  // updater
  output logic                      up_req,
  output logic [NODE_W-1:0]         up_node,
  output logic                      up_start,
  output logic signed [SCORE_W-1:0] up_score,
  output logic [TRL_W-1:0]          up_hist,
  output logic [WORD_W-1:0]         up_word,
  output logic                      up_fill,
  output map_ext_t                  up_fill_data,
  input  logic                      up_gnt,
  input  logic                      up_done,
  input  logic                      up_miss,
  // events
  output logic                      pruned,
  output logic                      busy,
  output logic                      waiting   // waiting on external memory
);
  typedef enum logic [3:0] {P_IDLE, P_NG, P_NGW, P_EXTNG, P_EXTNGW, P_ADD, P_CMP,
                            P_UP, P_UPW, P_EXTMAP, P_EXTMAPW, P_UPF} pstate_e;
  pstate_e ps;
  vjob_t   j;
  logic [NODE_W-1:0] dest;
  logic [LM_W-1:0]   lm;
  logic signed [SCORE_W-1:0] cand;
  map_ext_t          mapd;

  assign job_ready = (ps == P_IDLE);
  assign busy      = (ps != P_IDLE);
  assign waiting   = ps inside {P_EXTNG, P_EXTNGW, P_EXTMAP, P_EXTMAPW};
  assign ng_req    = (ps == P_NG);
  assign ng_id     = j.id;
  assign ext_req   = (ps == P_EXTNG) || (ps == P_EXTMAP);
  assign ext_kind  = (ps == P_EXTNG) ? EXT_NGRAM : EXT_MAP_RD;
  assign ext_addr  = (ps == P_EXTNG) ? EXT_AW'(j.id) : EXT_AW'(dest);
  assign up_req    = (ps == P_UP) || (ps == P_UPF);
  assign up_node   = dest;
  assign up_start  = j.dstart;
  assign up_score  = cand;
  assign up_hist   = j.hist;
  assign up_word   = j.word;
  assign up_fill   = (ps == P_UPF);
  assign up_fill_data = mapd;
  assign ng_fill      = (ps == P_EXTNGW) && ext_rsp_valid;
  assign ng_fill_data = ngram_t'(ext_rsp_data[NODE_W+LM_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_IDLE; j <= '0; dest <= '0; lm <= '0; cand <= '0; mapd <= '0; pruned <= 1'b0;
    end else begin
      pruned <= 1'b0;
      unique case (ps)
        P_IDLE: if (job_valid) begin
          j    <= job;
          dest <= job.id[NODE_W-1:0];
          lm   <= '0;
          ps   <= job.xword ? P_NG : P_ADD;
        end
        P_NG:  if (ng_gnt) ps <= P_NGW;
        P_NGW: if (ng_hit) begin
          dest <= ng_dest; lm <= ng_score; ps <= P_ADD;
        end else ps <= P_EXTNG;
        P_EXTNG:  if (ext_gnt) ps <= P_EXTNGW;
        P_EXTNGW: if (ext_rsp_valid) begin
          dest <= ng_fill_data.dest; lm <= ng_fill_data.score; ps <= P_ADD;
        end
        P_ADD: begin
          if (j.xword) cand <= sat_add(j.src, -(SCORE_W'(lm) <<< LM_SHIFT));
          else         cand <= sat_add(j.src, SCORE_W'(j.add));
          ps <= P_CMP;
        end
        P_CMP: if (cand < thr) begin
          pruned <= 1'b1; ps <= P_IDLE;
        end else ps <= P_UP;
        P_UP:  if (up_gnt) ps <= P_UPW;
        P_UPF: if (up_gnt) ps <= P_UPW;
        P_UPW: if (up_done) ps <= P_IDLE;
               else if (up_miss) ps <= P_EXTMAP;
        P_EXTMAP:  if (ext_gnt) ps <= P_EXTMAPW;
        P_EXTMAPW: if (ext_rsp_valid) begin
          mapd <= map_ext_t'(ext_rsp_data[$bits(map_ext_t)-1:0]);
          ps   <= P_UPF;
        end
        default: ps <= P_IDLE;
      endcase
    end
  end

  // A lookup result is only consumed in the clock after a grant.
  assert property (@(posedge clk) disable iff (!rst_n) (ps == P_NG && ng_gnt) |=> ps == P_NGW);
endmodule
