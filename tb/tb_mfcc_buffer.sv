// tb_mfcc_buffer: writes 20 frames x 25 dimensions and checks that a read
// of a dimension returns that dimension of every frame, one clock later.
module tb_mfcc_buffer;
  import tb_model_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en;
  logic [4:0] wr_frame, wr_dim, rd_dim;
  logic signed [15:0] wr_data;
  logic signed [15:0] rd_data [20];

  mfcc_buffer dut (.clk, .wr_en, .wr_frame, .wr_dim, .wr_data, .rd_dim, .rd_data);

  initial begin
    wr_en = 0; wr_frame = 0; wr_dim = 0; wr_data = 0; rd_dim = 0;
    for (int f = 0; f < 20; f++)
      for (int d = 0; d < 25; d++) begin
        @(negedge clk); wr_en = 1; wr_frame = 5'(f); wr_dim = 5'(d); wr_data = gen_feat(f + 3, d);
      end
    @(negedge clk); wr_en = 0;
    for (int d = 24; d >= 0; d--) begin
      @(negedge clk); rd_dim = 5'(d);
      @(negedge clk);
      for (int f = 0; f < 20; f++) begin
        checks++;
        if (rd_data[f] != gen_feat(f + 3, d)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
