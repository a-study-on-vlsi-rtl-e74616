// End-to-end testbench for hmm3_top at its default sizes.
// Streams compressed acoustic parameters and feature frames, serves the
// external dictionary / language model / node map from a behavioural memory
// with latency and back-pressure, and collects the word lattice.
// Self-checks: every acoustic result row written by the GMM core equals the
// reference model; lattice records are numbered 0,1,2,... with frame numbers
// that never decrease and stay below the run length; the active node count
// never exceeds the workspace; the run finishes within a clock bound; and
// every mechanism of the design (mixture skip, GMM/Viterbi overlap, Viterbi
// waiting for GMM, n-gram hit and miss, map cache hit and miss, node creation,
// overwrite, pruning, overflow, detailed frame, trigram, miss hidden behind
// another path, external stall) must have happened at least once.
// This run keeps every size at its default and runs only a few frames, so
// the search never grows to the workspace size or to the pruning threshold:
// overflow and pruning are reported but not required here (the reduced-size
// testbench requires them).

module tb_hmm3_top_full;
  import hmm_pkg::*;
  import tb_model_pkg::*;

  localparam int STATES   = 1987;
  localparam int FRAMES   = 20;
  localparam int WORDS    = 4096;
  localparam int NFR      = 24;
  localparam int LOOK     = 20;
  localparam longint LIMIT = 20000000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic feat_valid, feat_ready, sym_valid, sym_ready, sym_last;
  logic signed [FEAT_W-1:0] feat_data;
  logic [SYM_W-1:0] sym_data;
  logic ext_req_valid, ext_req_ready, ext_rsp_valid;
  ext_req_t ext_req;
  ext_rsp_t ext_rsp;
  logic trl_valid, trl_ready;
  trellis_t trl_rec;
  logic [TRL_W-1:0] trl_idx;
  logic signed [SCORE_W-1:0] thr;
  logic [13:0] active_count;
  hmm_events_t events;
  int n_reads, n_writes;

  hmm3_top  dut (
    .clk, .rst_n, .start, .total_frames(16'(NFR)), .lookahead(5'(LOOK)),
    .cfg_init_node(20'd0), .cfg_thr_init(-32'sd1000000), .cfg_margin(32'd3000),
    .cfg_trigram(1'b1), .cfg_top_n(16'd0), .cfg_detail_n(16'd0), .cfg_detail_cycle(8'd0),
    .busy, .done, .feat_valid, .feat_ready, .feat_data, .sym_valid, .sym_ready, .sym_data, .sym_last,
    .ext_req_valid, .ext_req_ready, .ext_req, .ext_rsp_valid, .ext_rsp,
    .trl_valid, .trl_ready, .trl_rec, .trl_idx, .thr, .active_count, .events
  );

  tb_ext_mem #(.LAT(8), .STATES(STATES), .WORDS(WORDS), .STALL_EVERY(5)) u_mem (
    .clk, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .req(ext_req),
    .rsp_valid(ext_rsp_valid), .rsp(ext_rsp), .n_reads, .n_writes
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  int ev_cnt [15];
  int n_trl = 0, last_frame = 0, blk = 0, rows = 0;
  int blk_first [2];
  logic [1:0] blk_n_set;

  // acoustic parameters: the state sequence 0..STATES-1 repeated for every block
  initial begin
    logic [17:0] sym [2048];
    int n;
    sym_valid = 0; sym_data = 0; sym_last = 0;
    wait (rst_n);
    forever
      for (int s = 0; s < STATES; s++) begin
        encode_state(s, sym, n);
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          sym_valid = 1; sym_data = sym[i]; sym_last = (i == n - 1);
          while (!sym_ready) @(negedge clk);
          @(posedge clk);
        end
      end
  end

  // feature frames in order, 25 coefficients each
  initial begin
    feat_valid = 0; feat_data = 0;
    wait (rst_n);
    for (int f = 0; f < NFR; f++)
      for (int d = 0; d < 25; d++) begin
        @(negedge clk);
        feat_valid = 1; feat_data = gen_feat(f, d);
        while (!feat_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk);
    feat_valid = 0;
  end

  // lattice sink with occasional back-pressure
  always @(negedge clk) trl_ready = ($urandom % 3) != 0;

  // first frame of each GMM block, tracked from the block start
  int gmm_first = 0, gmm_next = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dut.gmm_start) begin
      gmm_first = gmm_next;
      gmm_next  = gmm_next + int'(dut.gmm_nframes);
    end
    if (dut.res_we) begin
      rows++;
      for (int f = 0; f < FRAMES; f++) begin
        if (gmm_first + f < gmm_next) begin
          logic signed [15:0] xv [25];
          logic signed [23:0] e;
          for (int d = 0; d < 25; d++) xv[d] = gen_feat(gmm_first + f, d);
          e = gmm_ref(int'(dut.res_state), xv);
          checks++;
          if (dut.res_row[f*GMM_W +: GMM_W] != e) begin
            failures++;
            if (failures < 8) $display("gmm row state %0d frame %0d got %h exp %h",
                                       dut.res_state, gmm_first + f, 24'(dut.res_row >> (f*GMM_W)), e);
          end
        end
      end
    end
    if (trl_valid && trl_ready) begin
      checks += 3;
      if (int'(trl_idx) != n_trl) begin failures++; $display("lattice index %0d expected %0d", trl_idx, n_trl); end
      if (int'(trl_rec.frame) < last_frame || int'(trl_rec.frame) >= NFR) begin
        failures++; $display("lattice frame %0d after %0d", trl_rec.frame, last_frame);
      end
      if (int'(trl_rec.word) >= WORDS) begin failures++; $display("lattice word %0d", trl_rec.word); end
      last_frame = int'(trl_rec.frame);
      n_trl++;
    end
    if (int'(active_count) > 8192) begin
      failures++; $display("active count %0d over the workspace", active_count);
    end
    if (events.gmm_mix_skip) ev_cnt[0]++;
    if (events.overlap)      ev_cnt[1]++;
    if (events.vit_wait_gmm) ev_cnt[2]++;
    if (events.ng_hit)       ev_cnt[3]++;
    if (events.ng_miss)      ev_cnt[4]++;
    if (events.map_hit)      ev_cnt[5]++;
    if (events.map_miss)     ev_cnt[6]++;
    if (events.created)      ev_cnt[7]++;
    if (events.overwrite)    ev_cnt[8]++;
    if (events.pruned)       ev_cnt[9]++;
    if (events.overflow)     ev_cnt[10]++;
    if (events.detail_frame) ev_cnt[11]++;
    if (events.trigram)      ev_cnt[12]++;
    if (events.hidden_miss)  ev_cnt[13]++;
    if (ext_req_valid && !ext_req_ready) ev_cnt[14]++;
  end

  string ev_name [15] = '{"mixture skip", "gmm/viterbi overlap", "viterbi waits for gmm",
                         "ngram hit", "ngram miss", "map hit", "map miss", "node created",
                         "node overwritten", "pruned", "overflow", "detailed frame",
                         "trigram", "hidden miss", "external stall"};

  initial begin
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    repeat (40) @(posedge clk);
    checks += 3;
    if (n_trl == 0) begin failures++; $display("no lattice records"); end
    if (rows != STATES * ((NFR + LOOK - 1) / LOOK)) begin
      failures++; $display("gmm rows %0d", rows);
    end
    if (cyc > LIMIT) begin failures++; $display("run took %0d clocks", cyc); end
    foreach (ev_cnt[i]) begin
      checks++;
      $display("%-22s %0d", ev_name[i], ev_cnt[i]);
      if (ev_cnt[i] == 0 && !(i inside {9, 10})) begin failures++; $display("mechanism never happened: %s", ev_name[i]); end
    end
    $display("clocks=%0d lattice=%0d ext_reads=%0d ext_writes=%0d", cyc, n_trl, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LIMIT + 100000) @(posedge clk);
    failures++;
    $display("watchdog: clocks=%0d lattice=%0d", cyc, n_trl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
