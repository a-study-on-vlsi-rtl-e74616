// tb_gmm_input_buffer: streams four states of different lengths through the
// ping-pong buffers with random back-pressure on both sides; checks order,
// last flags, that a third state waits until a buffer frees, and that
// loading overlaps reading.
module tb_gmm_input_buffer;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_valid, wr_ready, wr_last, rd_valid, rd_ready, rd_last;
  logic [SYM_W-1:0] wr_sym, rd_sym;

  gmm_input_buffer #(.DEPTH(64)) dut (.clk, .rst_n, .wr_valid, .wr_ready, .wr_sym, .wr_last,
                                      .rd_valid, .rd_ready, .rd_sym, .rd_last);

  int lens [4] = '{5, 64, 1, 33};
  int rs = 0, ri = 0;
  int overlap = 0, blocked = 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_valid && rd_ready) begin
      checks++;
      if (rd_sym != SYM_W'(rs * 1000 + ri) || rd_last != (ri == lens[rs] - 1)) begin
        failures++;
        $display("got %0d last=%0d exp %0d", rd_sym, rd_last, rs * 1000 + ri);
      end
      if (ri == lens[rs] - 1) begin ri = 0; rs++; end else ri++;
    end
    if (wr_valid && wr_ready && rd_valid && rd_ready) overlap++;
    if (wr_valid && !wr_ready) blocked++;
  end

  initial begin
    wr_valid = 0; wr_sym = '0; wr_last = 0; rd_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    fork
      begin
        for (int s = 0; s < 4; s++)
          for (int i = 0; i < lens[s]; i++) begin
            @(negedge clk);
            wr_valid = 1; wr_sym = SYM_W'(s * 1000 + i); wr_last = (i == lens[s] - 1);
            while (!wr_ready) @(negedge clk);
            @(posedge clk);
          end
        @(negedge clk);
        wr_valid = 0;
      end
      begin
        repeat (150) @(posedge clk);   // reader starts late: writer must stall
        forever begin @(negedge clk); rd_ready = ($urandom % 4) != 0; end
      end
    join_any
    repeat (200) @(posedge clk);
    checks += 3;
    if (rs != 4) begin failures++; $display("read %0d states", rs); end
    if (overlap == 0) begin failures++; $display("no overlap of load and read"); end
    if (blocked == 0) begin failures++; $display("writer never waited for a buffer"); end
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
