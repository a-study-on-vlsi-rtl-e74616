// tb_rle_decoder: feeds the encoded parameters of three states and checks
// every rebuilt parameter, its index, the state-end flag, and that a state
// takes no more than 2 x 832 decoder steps.
module tb_rle_decoder;
  import hmm_pkg::*;
  import tb_model_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_last;
  logic [SYM_W-1:0] in_sym;
  logic [31:0] out_param;
  logic [9:0] out_idx;

  rle_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_param, .out_idx, .out_last);

  int exp_state = 0, exp_idx = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_param !== gen_param(exp_state, exp_idx) || out_idx != 10'(exp_idx) ||
        out_last != (exp_idx == 831)) begin
      failures++;
      if (failures < 5) $display("mismatch s=%0d i=%0d got %h exp %h", exp_state, exp_idx, out_param, gen_param(exp_state, exp_idx));
    end
    if (exp_idx == 831) begin exp_idx = 0; exp_state++; end else exp_idx++;
  end

  initial begin
    logic [17:0] sym [2048];
    int n;
    in_valid = 0; in_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      encode_state(s, sym, n);
      checks++;
      if (n > 1664 || n < 832) begin failures++; $display("state %0d: %0d steps", s, n); end
      for (int i = 0; i < n; i++) begin
        in_valid <= 1; in_sym <= sym[i];
        @(posedge clk);
        if (!in_ready) failures++;
      end
      // a reserved tag and an idle gap between states change nothing
      in_valid <= 1; in_sym <= {2'b11, 16'hdead};
      @(posedge clk);
      in_valid <= 0;
      repeat (2) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_state != 3) begin failures++; $display("only %0d states decoded", exp_state); end
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
