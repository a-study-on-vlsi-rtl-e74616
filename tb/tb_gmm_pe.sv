// tb_gmm_pe: runs the operation sequence of whole states for several frames
// and compares the result with the reference max-mixture score; also checks
// that mixtures are abandoned early (stopped) at least once and that a
// stopped mixture ignores further dimensions.
module tb_gmm_pe;
  import hmm_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stops = 0;

  pe_op_e op;
  logic signed [31:0] c_in;
  logic signed [15:0] x, mu;
  logic [15:0] prec;
  logic stopped, best_valid;
  logic signed [23:0] best;

  gmm_pe dut (.clk, .rst_n, .op, .c_in, .x, .mu, .prec, .stopped, .best_valid, .best);

  task automatic run_state(int s, int f);
    logic signed [15:0] xv [25];
    for (int d = 0; d < 25; d++) xv[d] = gen_feat(f, d);
    @(negedge clk); op = PE_CLEAR;
    for (int m = 0; m < 16; m++) begin
      @(negedge clk); op = PE_MIX_START; c_in = gen_param(s, m * 52);
      for (int d = 0; d < 25; d++) begin
        @(negedge clk); op = PE_DIM; x = xv[d]; mu = 16'(gen_param(s, m * 52 + 1 + d));
        prec = 16'(gen_param(s, m * 52 + 26 + d));
        if (stopped) stops++;
      end
      @(negedge clk); op = PE_MIX_END;
    end
    @(negedge clk); op = PE_NOP;
    @(negedge clk);
    checks++;
    if (!best_valid || best != gmm_ref(s, xv)) begin
      failures++;
      $display("s=%0d f=%0d got %0d exp %0d", s, f, best, gmm_ref(s, xv));
    end
  endtask

  initial begin
    op = PE_NOP; c_in = 0; x = 0; mu = 0; prec = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 12; s++) run_state(s * 97, s % 5);
    // saturation: a huge constant
    @(negedge clk); op = PE_CLEAR;
    @(negedge clk); op = PE_MIX_START; c_in = 32'sh7fff0000;
    @(negedge clk); op = PE_MIX_END;
    @(negedge clk); op = PE_NOP; @(negedge clk);
    checks++; if (best != 24'sh7fffff) failures++;
    checks++; if (stops == 0) begin failures++; $display("no early stop seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
