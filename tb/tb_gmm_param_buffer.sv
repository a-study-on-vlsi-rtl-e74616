// tb_gmm_param_buffer: fills both banks with different patterns, then reads
// random addresses on both ports and checks bank separation and the
// one-clock read latency.
module tb_gmm_param_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en, wr_bank, rd_bank;
  logic [9:0] wr_addr, rd_addr_a, rd_addr_b;
  logic [31:0] wr_data, rd_data_a, rd_data_b;

  gmm_param_buffer dut (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_bank, .rd_addr_a, .rd_addr_b,
                        .rd_data_a, .rd_data_b);

  function automatic logic [31:0] pat(int b, int a); return 32'(b * 32'h10001 + a * 977 + 5); endfunction

  initial begin
    wr_en = 0; wr_bank = 0; wr_addr = 0; wr_data = 0; rd_bank = 0; rd_addr_a = 0; rd_addr_b = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 832; a++) begin
        @(negedge clk); wr_en = 1; wr_bank = 1'(b); wr_addr = 10'(a); wr_data = pat(b, a);
      end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 500; k++) begin
      int b, a1, a2;
      b = $urandom % 2; a1 = $urandom % 832; a2 = $urandom % 832;
      @(negedge clk); rd_bank = 1'(b); rd_addr_a = 10'(a1); rd_addr_b = 10'(a2);
      @(negedge clk);
      checks += 2;
      if (rd_data_a != pat(b, a1)) failures++;
      if (rd_data_b != pat(b, a2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
