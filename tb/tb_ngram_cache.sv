// Testbench for ngram_cache. A shadow two-way cache in the testbench follows
// the same policy (index = low bits of the ID, a fill goes to way 0 and the
// old way 0 entry moves to way 1). Random lookups over a small ID range give
// both hits and misses; every miss is filled. The lookup answer must come
// exactly one clock after the request. A flush must make everything miss.
module tb_ngram_cache;
  import hmm_pkg::*;
  localparam int SETS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, lk_valid = 0, lk_done, lk_hit, fill_en = 0, hit_pulse, miss_pulse;
  logic [NGID_W-1:0] lk_id = 0, fill_id = 0;
  logic [NODE_W-1:0] lk_dest, fill_dest = 0;
  logic [LM_W-1:0] lk_score, fill_score = 0;
  ngram_cache #(.SETS(SETS)) dut (.*);

  logic [NGID_W-1:0] t0 [SETS], t1 [SETS];
  bit v0 [SETS], v1 [SETS];
  int checks = 0, failures = 0, hits = 0, misses = 0;

  function automatic logic [NODE_W-1:0] dest_of(logic [NGID_W-1:0] id); return NODE_W'(id * 77 + 3); endfunction
  function automatic logic [LM_W-1:0] score_of(logic [NGID_W-1:0] id); return LM_W'(id * 5); endfunction

  task automatic clear_model();
    for (int i = 0; i < SETS; i++) begin v0[i] = 0; v1[i] = 0; end
  endtask

  task automatic lookup(logic [NGID_W-1:0] id);
    int s; bit e;
    s = int'(id) % SETS;
    e = (v0[s] && t0[s] == id) || (v1[s] && t1[s] == id);
    @(negedge clk); lk_valid = 1; lk_id = id;
    @(negedge clk); lk_valid = 0;
    checks += 2;
    if (!lk_done || lk_hit != e) begin
      failures++; if (failures < 6) $display("id %0d hit %0d exp %0d done %0d", id, lk_hit, e, lk_done);
    end
    if (e && (lk_dest != dest_of(id) || lk_score != score_of(id))) begin
      failures++; if (failures < 6) $display("id %0d wrong data", id);
    end
    if (e) hits++;
    else begin
      misses++;
      fill_en = 1; fill_id = id; fill_dest = dest_of(id); fill_score = score_of(id);
      t1[s] = t0[s]; v1[s] = v0[s]; t0[s] = id; v0[s] = 1;
      @(negedge clk); fill_en = 0;
    end
  endtask

  initial begin
    clear_model();
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (SETS + 4) @(posedge clk);     // clear sweep after reset
    for (int i = 0; i < 3000; i++) begin
      if (i == 1500) begin
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        clear_model();
        repeat (SETS + 2) @(negedge clk);
      end
      lookup(NGID_W'($urandom % (3 * SETS)));
    end
    checks += 2;
    if (hits == 0 || misses == 0) begin failures++; $display("hits %0d misses %0d", hits, misses); end
    $display("hits=%0d misses=%0d", hits, misses);
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
