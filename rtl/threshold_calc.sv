// threshold_calc: dynamic beam-pruning threshold.
//
// Instead of sorting all new nodes at the end of a frame, the Viterbi core
// drops a transition at once if its score is below a threshold. This block
// moves the threshold from frame to frame, after the published idea: the
// threshold follows the change of the average node score between the last
// two frames, and is raised when more nodes than the target beam width were
// created (lowered when fewer). The exact rule is this implementation's:
//   first frame after init:  thr = avg_t - margin
//   later frames:            thr = thr + (avg_t - avg_{t-1})
//                                  + (count_t - TARGET) * 2^GAIN_SHIFT
// where avg_t = score_sum / count (a frame with no nodes keeps the old
// average). The division is a restoring divider, one quotient bit per clock.
//
// Interface: init (with margin) restarts the sequence; frame_end delivers a
// frame's count and score sum; ready pulses when thr holds the new value,
// SUM_W+3 clocks later. thr is valid from init on (init sets thr_init).
module threshold_calc
  import hmm_pkg::*;
#(
  parameter int TARGET     = 3000,
  parameter int GAIN_SHIFT = 0,
  parameter int CNT_W      = 14,
  parameter int SUM_W      = 48
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic signed [SCORE_W-1:0] thr_init,
  input  logic [SCORE_W-1:0]        margin,
  input  logic                      frame_end,
  input  logic [CNT_W-1:0]          count,
  input  logic signed [SUM_W-1:0]   score_sum,
  output logic signed [SCORE_W-1:0] thr,
  output logic signed [SCORE_W-1:0] avg,
  output logic                      ready
);
  typedef enum logic [1:0] {T_IDLE, T_DIV, T_UPD} tstate_e;
  tstate_e st;

  logic                    first;
  logic                    neg;
  logic                    zero_q;
  logic [SUM_W-1:0]        rem, quo, dvd;
  logic [CNT_W-1:0]        cnt_q;
  logic [$clog2(SUM_W):0]  bitn;
  logic signed [SCORE_W-1:0] avg_prev;
  logic [SUM_W:0]          trial;

  assign trial = {rem[SUM_W-1:0], dvd[SUM_W-1]} - {{(SUM_W+1-CNT_W){1'b0}}, cnt_q};

  logic signed [SCORE_W-1:0]     upd_a;
  logic signed [SCORE_W+CNT_W:0] upd_dc;
  assign upd_a  = zero_q ? avg_prev : (neg ? -SCORE_W'(quo) : SCORE_W'(quo));
  assign upd_dc = ((SCORE_W+CNT_W+1)'(signed'({1'b0, cnt_q})) - (SCORE_W+CNT_W+1)'(TARGET)) <<< GAIN_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; first <= 1'b1; neg <= 1'b0; zero_q <= 1'b0; rem <= '0; quo <= '0; dvd <= '0;
      cnt_q <= '0; bitn <= '0; avg_prev <= '0; avg <= '0; thr <= '0; ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (init) begin
        st <= T_IDLE; first <= 1'b1; thr <= thr_init;
      end else unique case (st)
        T_IDLE: if (frame_end) begin
          if (count == '0) begin
            zero_q <= 1'b1;
            st     <= T_UPD;
          end else begin
            zero_q <= 1'b0;
            neg   <= score_sum[SUM_W-1];
            dvd   <= score_sum[SUM_W-1] ? SUM_W'(-score_sum) : SUM_W'(score_sum);
            cnt_q <= count;
            rem   <= '0;
            quo   <= '0;
            bitn  <= '0;
            st    <= T_DIV;
          end
        end
        T_DIV: begin
          if (!trial[SUM_W]) begin
            rem <= trial[SUM_W-1:0];
            quo <= {quo[SUM_W-2:0], 1'b1};
          end else begin
            rem <= {rem[SUM_W-2:0], dvd[SUM_W-1]};
            quo <= {quo[SUM_W-2:0], 1'b0};
          end
          dvd  <= dvd << 1;
          bitn <= bitn + 1'b1;
          if (bitn == ($clog2(SUM_W)+1)'(SUM_W-1)) st <= T_UPD;
        end
        T_UPD: begin
          if (first) thr <= upd_a - signed'(margin);
          else       thr <= thr + (upd_a - avg_prev) + SCORE_W'(upd_dc);
          avg      <= upd_a;
          avg_prev <= upd_a;
          first    <= 1'b0;
          ready    <= 1'b1;
          cnt_q    <= '0;
          st       <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
