// trellis_writer: trellis save and output buffer.
//
// When an expanded node is the last state of a word, the Viterbi core saves
// a trellis record: the word, its end score, the index of the record of the
// previous word on the same path (the word history) and the frame. This
// block numbers the records in the order they arrive (the number is what
// later records point to as their history) and queues them in the output
// buffer, from which the host reads them; the host recovers the sentence by
// following history pointers back from the best record of the last frame.
// Trellis save and the output buffer are published parts; the record layout
// and the host-side backtrack are this implementation's choice.
//
// Interface: valid/ready on both sides. in_idx is the number given to the
// record offered on in_rec, valid while in_valid is high; the record is
// taken when in_ready is high. init restarts the numbering and empties the
// buffer.
module trellis_writer
  import hmm_pkg::*;
#(
  parameter int OUT_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             in_valid,
  output logic             in_ready,
  input  trellis_t         in_rec,
  output logic [TRL_W-1:0] in_idx,
  output logic             out_valid,
  input  logic             out_ready,
  output trellis_t         out_rec,
  output logic [TRL_W-1:0] out_idx
);
  localparam int AW = $clog2(OUT_DEPTH);

  trellis_t         rec_q [OUT_DEPTH];
  logic [TRL_W-1:0] idx_q [OUT_DEPTH];
  logic [AW:0]      wp, rp;
  logic [TRL_W-1:0] next_idx;
  logic             full, empty;

  assign full      = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign empty     = (wp == rp);
  assign in_ready  = !full && !init;
  assign in_idx    = next_idx;
  assign out_valid = !empty;
  assign out_rec   = rec_q[rp[AW-1:0]];
  assign out_idx   = idx_q[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      rec_q[wp[AW-1:0]] <= in_rec;
      idx_q[wp[AW-1:0]] <= next_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; next_idx <= '0;
    end else if (init) begin
      wp <= '0; rp <= '0; next_idx <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wp       <= wp + 1'b1;
        next_idx <= next_idx + 1'b1;
      end
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
endmodule
