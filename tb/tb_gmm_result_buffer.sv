// Testbench for gmm_result_buffer: writes random rows into both banks and
// reads single scores back at random bank / state / frame, comparing with a
// shadow copy. The read is checked to appear exactly one clock after the
// address, the latency the Viterbi core relies on.
module tb_gmm_result_buffer;
  import hmm_pkg::*;
  localparam int STATES = 16, FRAMES = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [STATE_W-1:0] wr_state = 0, rd_state = 0;
  logic [FRAMES*GMM_W-1:0] wr_row = 0;
  logic [4:0] rd_frame = 0;
  logic signed [GMM_W-1:0] rd_data;
  gmm_result_buffer #(.STATES(STATES), .FRAMES(FRAMES)) dut (.*);

  logic [GMM_W-1:0] shadow [2][STATES][FRAMES];
  int checks = 0, failures = 0;

  initial begin
    // fill everything once so every read has a known value
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < STATES; s++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 1'(b); wr_state = STATE_W'(s);
        for (int f = 0; f < FRAMES; f++) begin
          shadow[b][s][f] = GMM_W'($urandom);
          wr_row[f*GMM_W +: GMM_W] = shadow[b][s][f];
        end
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [GMM_W-1:0] e;
      logic b; int s, f;
      @(negedge clk);
      b = 1'($urandom); s = $urandom % STATES; f = $urandom % FRAMES;
      rd_bank = b; rd_state = STATE_W'(s); rd_frame = 5'(f);
      e = shadow[b][s][f];
      // a write to the other bank in the same clock must not disturb the read
      wr_en = 1; wr_bank = !b; wr_state = STATE_W'($urandom % STATES);
      for (int k = 0; k < FRAMES; k++) begin
        shadow[!b][wr_state][k] = GMM_W'($urandom);
        wr_row[k*GMM_W +: GMM_W] = shadow[!b][wr_state][k];
      end
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data !== e) begin
        failures++;
        if (failures < 5) $display("bank %0d state %0d frame %0d got %h exp %h", b, s, f, rd_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
