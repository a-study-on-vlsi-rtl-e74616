// Testbench for active_node_workspace: random writes into both banks while
// the two read ports read random addresses; every read is compared one
// clock later with a shadow copy (the ports are registered, one clock).
module tb_active_node_workspace;
  import hmm_pkg::*;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0, rdb_bank = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0, rdb_addr = 0;
  anode_t wr_data = '0, rd_data, rdb_data;
  active_node_workspace #(.DEPTH(DEPTH)) dut (.*);

  anode_t shadow [2][DEPTH];
  int checks = 0, failures = 0;

  function automatic anode_t rnd();
    anode_t a;
    a.node = NODE_W'($urandom); a.score = $urandom; a.hist = TRL_W'($urandom); a.word = WORD_W'($urandom);
    return a;
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 1'(b); wr_addr = AW'(i); shadow[b][i] = rnd(); wr_data = shadow[b][i];
      end
    for (int i = 0; i < 3000; i++) begin
      anode_t ea, eb;
      @(negedge clk);
      rd_bank = 1'($urandom); rd_addr = AW'($urandom);
      rdb_bank = 1'($urandom); rdb_addr = AW'($urandom);
      ea = shadow[rd_bank][rd_addr];
      eb = shadow[rdb_bank][rdb_addr];
      wr_en = 1'($urandom); wr_bank = 1'($urandom); wr_addr = AW'($urandom); wr_data = rnd();
      // a read of the address being written returns the old contents
      if (wr_en) shadow[wr_bank][wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0;
      checks += 2;
      if (rd_data !== ea) begin failures++; if (failures < 5) $display("port a addr %0d", rd_addr); end
      if (rdb_data !== eb) begin failures++; if (failures < 5) $display("port b addr %0d", rdb_addr); end
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
