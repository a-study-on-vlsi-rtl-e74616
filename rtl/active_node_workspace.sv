// active_node_workspace: the two active node workspaces.
//
// One bank holds the active nodes of the current frame, which the Viterbi
// core reads back as transition sources; the other collects the nodes
// created and overwritten for the next frame. The banks swap roles every
// frame (the caller chooses the bank on each port). Two workspaces are the
// published structure; the depth and the record layout (anode_t) are this
// implementation's choice, sized from the published RAM total.
//
// Timing: one write and two reads per clock (port A for the node fetcher,
// port B for the updater's compare); read data registered, so a read in the
// clock after a write to the same address returns the new value.
module active_node_workspace
  import hmm_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  anode_t                   wr_data,
  input  logic                     rd_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output anode_t                   rd_data,
  input  logic                     rdb_bank,
  input  logic [$clog2(DEPTH)-1:0] rdb_addr,
  output anode_t                   rdb_data
);
  anode_t mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
    rd_data  <= mem[rd_bank][rd_addr];
    rdb_data <= mem[rdb_bank][rdb_addr];
  end
endmodule
