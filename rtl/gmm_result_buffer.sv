// gmm_result_buffer: double buffer of GMM results between the two cores.
//
// Bank b holds, for every state, the log output probabilities of one block
// of look-ahead frames (one row of FRAMES values per state). The GMM core
// fills one bank while the Viterbi core reads the other, which is what lets
// the two cores run as an elastic pipeline: either may run ahead by up to a
// block. The double buffer is the published structure; the 24-bit value
// width is this implementation's choice, sized from the published RAM total.
//
// Interface: whole-row write (one state, all frames); single-value read by
// (bank, state, frame) with the data registered one clock later.
module gmm_result_buffer
  import hmm_pkg::*;
#(
  parameter int STATES = 1987,
  parameter int FRAMES = 20
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic                    wr_bank,
  input  logic [STATE_W-1:0]      wr_state,
  input  logic [FRAMES*GMM_W-1:0] wr_row,
  input  logic                    rd_bank,
  input  logic [STATE_W-1:0]      rd_state,
  input  logic [4:0]              rd_frame,
  output logic signed [GMM_W-1:0] rd_data
);
  logic [FRAMES*GMM_W-1:0] mem [2][STATES];
  logic [FRAMES*GMM_W-1:0] row_q;
  logic [4:0]              frame_q;

  always_ff @(posedge clk) begin
    if (wr_en && wr_state < STATE_W'(STATES)) mem[wr_bank][wr_state] <= wr_row;
    row_q   <= (rd_state < STATE_W'(STATES)) ? mem[rd_bank][rd_state] : '0;
    frame_q <= rd_frame;
  end

  always_comb begin
    rd_data = '0;
    for (int f = 0; f < FRAMES; f++)
      if (frame_q == 5'(f)) rd_data = row_q[f*GMM_W +: GMM_W];
  end
endmodule
