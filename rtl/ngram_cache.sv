// ngram_cache: two-way set-associative cache of n-gram entries.
//
// Keeps the language-model entries used by cross-word transitions on chip,
// since the same word ends tend to recur in the following frames. As in the
// published design, the set index is the low bits of the n-gram ID and the
// tag is the whole ID; each way holds a 20-bit destination node and an 8-bit
// score. On a miss the fetched entry is written to way 0 and the entry that
// was in way 0 moves to way 1, so the most recent two entries of a set stay.
// Bigram and trigram IDs share the cache (trigram IDs are offset by the
// memory layout).
//
// Timing: a lookup (lk_valid, lk_id) is answered the next clock on
// lk_done/lk_hit/lk_dest/lk_score. fill_* writes a set in one clock; a fill
// and a lookup of the same set in one clock see the old contents. The valid
// bit lives in each RAM line (no wide reset vector): after reset or flush a
// sweep clears one set per clock (SETS clocks); meanwhile every lookup
// misses and fills are dropped. The sweep is this implementation's choice.
module ngram_cache
  import hmm_pkg::*;
#(
  parameter int SETS = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              lk_valid,
  input  logic [NGID_W-1:0] lk_id,
  output logic              lk_done,
  output logic              lk_hit,
  output logic [NODE_W-1:0] lk_dest,
  output logic [LM_W-1:0]   lk_score,
  input  logic              fill_en,
  input  logic [NGID_W-1:0] fill_id,
  input  logic [NODE_W-1:0] fill_dest,
  input  logic [LM_W-1:0]   fill_score,
  output logic              hit_pulse,
  output logic              miss_pulse
);
  localparam int IW = $clog2(SETS);

  typedef struct packed {
    logic              v;
    logic [NGID_W-1:0] tag;
    ngram_t            data;
  } line_t;

  line_t         way0 [SETS];
  line_t         way1 [SETS];
  logic          sweeping;
  logic [IW-1:0] sw_idx;

  logic [IW-1:0] li, fi;
  assign li = lk_id[IW-1:0];
  assign fi = fill_id[IW-1:0];

  line_t l0, l1;
  assign l0 = way0[li];
  assign l1 = way1[li];

  // one write port per way: the clear sweep has priority; fills arriving
  // during a sweep are dropped (a later lookup simply misses again)
  always_ff @(posedge clk) begin
    if (sweeping) begin
      way0[sw_idx] <= '0;
      way1[sw_idx] <= '0;
    end else if (fill_en) begin
      way0[fi] <= '{v: 1'b1, tag: fill_id, data: '{dest: fill_dest, score: fill_score}};
      way1[fi] <= way0[fi];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweeping <= 1'b1; sw_idx <= '0;
      lk_done <= 1'b0; lk_hit <= 1'b0; lk_dest <= '0; lk_score <= '0;
      hit_pulse <= 1'b0; miss_pulse <= 1'b0;
    end else begin
      lk_done    <= lk_valid;
      hit_pulse  <= 1'b0;
      miss_pulse <= 1'b0;
      lk_hit     <= 1'b0;
      if (lk_valid) begin
        if (!sweeping && l0.v && l0.tag == lk_id) begin
          lk_hit <= 1'b1; lk_dest <= l0.data.dest; lk_score <= l0.data.score;
          hit_pulse <= 1'b1;
        end else if (!sweeping && l1.v && l1.tag == lk_id) begin
          lk_hit <= 1'b1; lk_dest <= l1.data.dest; lk_score <= l1.data.score;
          hit_pulse <= 1'b1;
        end else begin
          miss_pulse <= 1'b1;
        end
      end
      if (flush) begin
        sweeping <= 1'b1; sw_idx <= '0;
      end else if (sweeping) begin
        sw_idx <= sw_idx + 1'b1;
        if (sw_idx == IW'(SETS-1)) sweeping <= 1'b0;
      end
    end
  end
endmodule
