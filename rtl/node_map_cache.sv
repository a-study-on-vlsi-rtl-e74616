// node_map_cache: direct-mapped cache of the active node map ("token list").
//
// The map tells, for a destination node, whether it is already active in the
// frame being built and where (its workspace slot). Every transition checks
// it, so it is cached on chip. Start-state nodes are looked up far more often
// than other nodes (every cross-word transition ends on one) and would
// otherwise be evicted by them, so, as in the published design, the cache is
// split in two halves: one only for start-state nodes, one for all others.
//
// Each line holds the node tag, a frame tag and a slot. A node counts as
// active only if its frame tag equals the frame being built, so the map
// never has to be cleared between frames (this implementation's choice).
//
// Timing: lookup is combinational (lk_* -> lk_hit, lk_ftag, lk_slot); a
// write (install or update) takes effect at the clock edge. After reset or
// flush a sweep clears one line per clock (2*2^IDX_W clocks); during it every
// lookup misses and writes are dropped, which is safe because the external
// map behind this cache always holds every entry. The valid bit is kept in
// the RAM line rather than in a wide reset vector (implementation choice).
module node_map_cache
  import hmm_pkg::*;
#(
  parameter int IDX_W  = 13,    // lines per half = 2^IDX_W
  parameter int SLOT_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic [NODE_W-1:0] lk_node,
  input  logic              lk_start,
  output logic              lk_hit,
  output logic [FTAG_W-1:0] lk_ftag,
  output logic [SLOT_W-1:0] lk_slot,
  input  logic              wr_en,
  input  logic [NODE_W-1:0] wr_node,
  input  logic              wr_start,
  input  logic [FTAG_W-1:0] wr_ftag,
  input  logic [SLOT_W-1:0] wr_slot
);
  localparam int TAG_W = NODE_W - IDX_W;
  localparam int LINES = 2 << IDX_W;

  typedef struct packed {
    logic              v;
    logic [TAG_W-1:0]  tag;
    logic [FTAG_W-1:0] ftag;
    logic [SLOT_W-1:0] slot;
  } line_t;

  line_t          mem [LINES];
  logic           sweeping;
  logic [IDX_W:0] sw_idx;

  logic [IDX_W:0] li, wi;
  assign li = {lk_start, lk_node[IDX_W-1:0]};
  assign wi = {wr_start, wr_node[IDX_W-1:0]};

  // during a clear sweep every lookup misses; the caller then falls back to
  // the external map, which is always up to date
  assign lk_hit  = !sweeping && mem[li].v && mem[li].tag == lk_node[NODE_W-1:IDX_W];
  assign lk_ftag = mem[li].ftag;
  assign lk_slot = mem[li].slot;

  always_ff @(posedge clk) begin
    if (sweeping)   mem[sw_idx] <= '0;
    else if (wr_en) mem[wi] <= '{v: 1'b1, tag: wr_node[NODE_W-1:IDX_W], ftag: wr_ftag, slot: wr_slot};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweeping <= 1'b1; sw_idx <= '0;
    end else if (flush) begin
      sweeping <= 1'b1; sw_idx <= '0;
    end else if (sweeping) begin
      sw_idx <= sw_idx + 1'b1;
      if (sw_idx == (IDX_W+1)'(LINES-1)) sweeping <= 1'b0;
    end
  end
endmodule
