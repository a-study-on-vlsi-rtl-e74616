// Testbench for node_map_cache: a direct-mapped shadow model with separate
// halves for word-start nodes and other nodes. Random writes and lookups
// over a node range larger than the cache give hits, misses and conflicts;
// the lookup is combinational and is checked in the same clock. After reset
// and after a flush every lookup must miss until the clear sweep is over.
module tb_node_map_cache;
  import hmm_pkg::*;
  localparam int IDX_W = 3, SLOT_W = 13, LINES = 2 << IDX_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, lk_start = 0, lk_hit, wr_en = 0, wr_start = 0;
  logic [NODE_W-1:0] lk_node = 0, wr_node = 0;
  logic [FTAG_W-1:0] lk_ftag, wr_ftag = 0;
  logic [SLOT_W-1:0] lk_slot, wr_slot = 0;
  node_map_cache #(.IDX_W(IDX_W), .SLOT_W(SLOT_W)) dut (.*);

  bit v [LINES];
  logic [NODE_W-1:0] n [LINES];
  logic [FTAG_W-1:0] ft [LINES];
  logic [SLOT_W-1:0] sl [LINES];
  int checks = 0, failures = 0, hits = 0;

  initial begin
    foreach (v[i]) v[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (LINES + 4) @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      int li; bit e;
      if (i == 2000) begin
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        foreach (v[k]) v[k] = 0;
        repeat (LINES + 2) @(negedge clk);
      end
      @(negedge clk);
      lk_node = NODE_W'($urandom % 40); lk_start = 1'($urandom);
      li = {lk_start, lk_node[IDX_W-1:0]};
      e = v[li] && n[li] == lk_node;
      #1;
      checks++;
      if (lk_hit != e || (e && (lk_ftag != ft[li] || lk_slot != sl[li]))) begin
        failures++; if (failures < 6) $display("node %0d start %0d hit %0d exp %0d", lk_node, lk_start, lk_hit, e);
      end
      if (e) hits++;
      wr_en = 1'($urandom); wr_node = NODE_W'($urandom % 40); wr_start = 1'($urandom);
      wr_ftag = FTAG_W'($urandom); wr_slot = SLOT_W'($urandom);
      if (wr_en) begin
        li = {wr_start, wr_node[IDX_W-1:0]};
        v[li] = 1; n[li] = wr_node; ft[li] = wr_ftag; sl[li] = wr_slot;
      end
      @(negedge clk); wr_en = 0;
    end
    checks++;
    if (hits == 0) begin failures++; $display("no hits"); end
    $display("hits=%0d", hits);
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
