// Testbench for global_sequencer. Two stand-in cores answer gmm_start and
// vit_frame_start after random delays (GMM: a delay per frame of the block;
// Viterbi: a random delay per frame, sometimes long, so that each side has to
// wait for the other). The testbench records which frames each GMM block
// wrote into which bank and checks that every Viterbi frame is issued in
// order, only after its block is complete, from the right bank and column,
// and that a bank is not overwritten while frames in it are still unread.
// It also checks that both cores were busy at the same time and that the
// Viterbi side had to wait for the GMM side at least once.
module tb_global_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, gmm_start, gmm_bank, gmm_done = 0, vit_init, vit_frame_start, vit_bank, vit_frame_done = 0;
  logic busy, done, overlap, vit_wait;
  logic [15:0] total_frames = 0, vit_frame_no;
  logic [4:0] lookahead = 0, gmm_nframes, vit_col;
  global_sequencer #(.FRAMES(20)) dut (.*);

  int checks = 0, failures = 0, n_overlap = 0, n_wait = 0;
  int bank_first [2], bank_len [2], bank_read [2];
  int g_next = 0, v_expect = 0;
  longint cyc = 0, work = 0;

  always @(posedge clk) begin
    cyc++;
    if (overlap) n_overlap++;
    if (vit_wait) n_wait++;
  end

  // stand-in GMM core
  initial forever begin
    @(posedge clk);
    if (rst_n && gmm_start) begin
      int b, n;
      #1;
      b = gmm_bank; n = gmm_nframes;
      checks++;
      if (bank_read[b] < bank_len[b]) begin
        failures++; $display("bank %0d overwritten with %0d frames unread", b, bank_len[b] - bank_read[b]);
      end
      bank_first[b] = g_next; bank_len[b] = -1; bank_read[b] = 0;
      g_next += n;
      repeat (n * (3 + $urandom % 20)) @(posedge clk);
      bank_len[b] = n;
      @(negedge clk); gmm_done = 1; @(negedge clk); gmm_done = 0;
    end
  end

  // stand-in Viterbi core
  initial forever begin
    @(posedge clk);
    if (rst_n && vit_frame_start) begin
      int b, c;
      #1;
      b = vit_bank; c = vit_col;
      checks += 3;
      if (int'(vit_frame_no) != v_expect) begin failures++; $display("frame %0d exp %0d", vit_frame_no, v_expect); end
      if (bank_len[b] < 0 || c >= bank_len[b]) begin failures++; $display("frame %0d from an unfinished block", vit_frame_no); end
      else if (bank_first[b] + c != int'(vit_frame_no)) begin failures++; $display("frame %0d read from bank %0d col %0d", vit_frame_no, b, c); end
      v_expect++;
      repeat (($urandom % 5 == 0) ? 200 : 5 + $urandom % 30) @(posedge clk);
      bank_read[b]++;
      @(negedge clk); vit_frame_done = 1; @(negedge clk); vit_frame_done = 0;
    end
  end

  task automatic run(int n, int la);
    longint t0;
    bank_len[0] = 0; bank_len[1] = 0; bank_read[0] = 0; bank_read[1] = 0;
    g_next = 0; v_expect = 0;
    @(negedge clk); start = 1; total_frames = 16'(n); lookahead = 5'(la);
    @(negedge clk); start = 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    checks++;
    if (v_expect != n) begin failures++; $display("%0d frames run, exp %0d", v_expect, n); end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    foreach (bank_len[i]) begin bank_len[i] = 0; bank_read[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    run(45, 20);
    run(37, 7);
    run(5, 1);
    run(10, 0);
    checks += 2;
    if (n_overlap == 0) begin failures++; $display("the cores never overlapped"); end
    if (n_wait == 0) begin failures++; $display("Viterbi never waited for GMM"); end
    $display("overlap=%0d wait=%0d", n_overlap, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
