// tb_gmm_core: two blocks (20 frames, then 7) over a reduced set of states.
// Features and compressed parameters are streamed in; every result row is
// compared with the reference max-mixture score of each frame. Also checks
// that loading/decoding overlapped computing, that mixtures were cut short,
// and that a state takes at most 1664 decode steps plus the compute time.
module tb_gmm_core;
  import hmm_pkg::*;
  import tb_model_pkg::*;
  localparam int STATES = 6;
  localparam int FRAMES = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, feat_valid, feat_ready, sym_valid, sym_ready, sym_last;
  logic [4:0] nframes;
  logic signed [15:0] feat_data;
  logic [SYM_W-1:0] sym_data;
  logic res_we, busy, done, mix_skip;
  logic [STATE_W-1:0] res_state;
  logic [FRAMES*GMM_W-1:0] res_row;

  gmm_core #(.STATES(STATES)) dut (.clk, .rst_n, .start, .nframes, .feat_valid, .feat_ready, .feat_data,
    .sym_valid, .sym_ready, .sym_data, .sym_last, .res_we, .res_state, .res_row, .busy, .done, .mix_skip);

  int blk_first = 0, blk_n = 20, rows = 0, skips = 0, overlap = 0;
  longint cyc = 0, t0;
  int dec_s = 0, dbg = 0;
  always @(posedge clk) begin
    cyc++;
    if (mix_skip) skips++;
    if (dut.dec_out_valid) begin
      if (dut.dec_out_param != gen_param(dec_s, int'(dut.dec_out_idx)) && dbg < 5) begin
        dbg++; $display("dec state %0d idx %0d got %h exp %h", dec_s, dut.dec_out_idx, dut.dec_out_param, gen_param(dec_s, int'(dut.dec_out_idx)));
      end
      if (dut.dec_out_last) dec_s = (dec_s + 1) % STATES;
    end
    if (dut.dec_go && dut.op_q == PE_DIM) overlap++;
    if (res_we) begin
      rows++;
      for (int f = 0; f < blk_n; f++) begin
        logic signed [15:0] xv [25];
        logic signed [23:0] e;
        for (int d = 0; d < 25; d++) xv[d] = gen_feat(blk_first + f, d);
        e = gmm_ref(int'(res_state), xv);
        checks++;
        if (res_row[f*GMM_W +: GMM_W] != e) begin
          failures++;
          if (failures < 6) $display("t=%0d state %0d frame %0d got %h exp %h", cyc, res_state, f,
                                     24'(res_row >> (f*GMM_W)), e);
        end
      end
    end
  end

  task automatic send_states();
    logic [17:0] sym [2048];
    int n;
    for (int s = 0; s < STATES; s++) begin
      encode_state(s, sym, n);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        sym_valid = 1; sym_data = sym[i]; sym_last = (i == n - 1);
        while (!sym_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      sym_valid = 0;
    end
  endtask

  task automatic run_block(int first, int n);
    blk_first = first; blk_n = n; rows = 0;
    t0 = cyc;
    @(negedge clk); start = 1; nframes = 5'(n);
    @(negedge clk); start = 0;
    fork
      begin
        for (int f = 0; f < n; f++)
          for (int d = 0; d < 25; d++) begin
            @(negedge clk);
            feat_valid = 1; feat_data = gen_feat(first + f, d);
            while (!feat_ready) @(negedge clk);
            @(posedge clk);
          end
        @(negedge clk);
        feat_valid = 0;
      end
      send_states();
    join
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 2;
    if (rows != STATES) begin failures++; $display("rows %0d", rows); end
    // per state: at most 1664 decode steps; compute 16 x 28 clocks hides under it
    if (cyc - t0 > longint'(STATES) * 1700 + 600) begin
      failures++; $display("block took %0d clocks", cyc - t0);
    end
  endtask

  initial begin
    start = 0; nframes = 0; feat_valid = 0; feat_data = 0; sym_valid = 0; sym_data = 0; sym_last = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    run_block(0, 20);
    run_block(40, 7);
    checks += 2;
    if (skips == 0)   begin failures++; $display("no mixture was cut short"); end
    if (overlap == 0) begin failures++; $display("decode never overlapped compute"); end
    $display("skips=%0d overlap=%0d", skips, overlap);
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
