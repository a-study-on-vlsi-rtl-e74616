// Testbench for trellis_writer: random producer and consumer handshakes.
// Checks that every record leaves in order, unchanged, with the index it was
// given on entry, that indices count up from 0 and restart after init, and
// that a full buffer back-pressures the producer rather than dropping.
module tb_trellis_writer;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  trellis_t in_rec = '0, out_rec;
  logic [TRL_W-1:0] in_idx, out_idx;
  trellis_writer #(.OUT_DEPTH(4)) dut (.*);

  trellis_t q [$];
  int checks = 0, failures = 0, sent = 0, got = 0, stalls = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid && out_ready) begin
      trellis_t e;
      checks += 2;
      e = q.pop_front();
      if (out_rec !== e) begin failures++; if (failures < 5) $display("record %0d differs", got); end
      if (int'(out_idx) != got % 300) begin failures++; if (failures < 5) $display("idx %0d exp %0d", out_idx, got); end
      got++;
    end
  end

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_rec.word = WORD_W'($urandom); in_rec.score = $urandom; in_rec.hist = TRL_W'($urandom);
      in_rec.frame = 16'($urandom);
      while (!in_ready) @(negedge clk);
      checks++;
      if (int'(in_idx) != i) begin failures++; $display("in_idx %0d exp %0d", in_idx, i); end
      q.push_back(in_rec);
      @(posedge clk);
      sent++;
      @(negedge clk); in_valid = 0;
      repeat ($urandom % 2) @(negedge clk);
    end
    while (got < sent) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    fork forever begin @(negedge clk); out_ready = ($urandom % 4) == 0; end join_none
    run(300);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    run(300);
    checks++;
    if (stalls == 0) begin failures++; $display("buffer never filled"); end
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
