// Testbench for threshold_calc. A reference model in the testbench works out
// the average score (rounded toward zero) and the threshold update for random
// node counts and score sums, including empty frames. The new threshold must
// be ready within SUM_W + 4 clocks of the frame end, so that it is in place
// before the next frame starts.
module tb_threshold_calc;
  import hmm_pkg::*;
  localparam int TARGET = 3000, CNT_W = 14, SUM_W = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, frame_end = 0, ready;
  logic signed [SCORE_W-1:0] thr_init = 0, thr, avg;
  logic [SCORE_W-1:0] margin = 0;
  logic [CNT_W-1:0] count = 0;
  logic signed [SUM_W-1:0] score_sum = 0;
  threshold_calc #(.TARGET(TARGET)) dut (.*);

  int checks = 0, failures = 0;
  longint m_thr, m_prev;
  bit first;

  task automatic frame(int cnt, longint sum);
    longint a;
    int t;
    @(negedge clk); frame_end = 1; count = CNT_W'(cnt); score_sum = SUM_W'(sum);
    @(negedge clk); frame_end = 0;
    t = 0;
    while (!ready && t < 200) begin @(negedge clk); t++; end
    if (cnt == 0) a = m_prev;
    else a = (sum < 0) ? -((-sum) / cnt) : sum / cnt;
    if (first) m_thr = a - longint'(margin);
    else       m_thr = m_thr + (a - m_prev) + (cnt - TARGET);
    m_prev = a; first = 0;
    checks += 3;
    if (t > SUM_W + 4) begin failures++; $display("update took %0d clocks", t); end
    if (avg !== SCORE_W'(a)) begin failures++; $display("avg %0d exp %0d", avg, a); end
    if (thr !== SCORE_W'(m_thr)) begin failures++; $display("thr %0d exp %0d", thr, m_thr); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk); init = 1; thr_init = -32'sd500000; margin = 32'(1000 + $urandom % 4000);
      @(negedge clk); init = 0;
      first = 1; m_prev = 0;
      checks++;
      if (thr !== thr_init) begin failures++; $display("init thr %0d", thr); end
      for (int f = 0; f < 60; f++) begin
        int c;
        longint avgsc;
        c = (f % 17 == 5) ? 0 : 1 + $urandom % 6000;
        avgsc = -longint'($urandom % 200000);
        frame(c, avgsc * c - longint'($urandom % (c + 1)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
