// mfcc_buffer: feature vectors of the look-ahead frames.
//
// Holds up to FRAMES feature vectors of DIMS dimensions. The GMM processors
// work one per frame on the same parameter, so a read returns one dimension
// of every frame at once. The features come from the host (feature
// extraction is done off chip). Frame count and dimension follow the
// published design; the 16-bit signed feature format is this
// implementation's choice.
//
// Timing: one write per clock; read data is registered (one clock latency).
module mfcc_buffer
  import hmm_pkg::*;
#(
  parameter int FRAMES = 20,
  parameter int DIMS   = 25
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [4:0]               wr_frame,
  input  logic [4:0]               wr_dim,
  input  logic signed [FEAT_W-1:0] wr_data,
  input  logic [4:0]               rd_dim,
  output logic signed [FEAT_W-1:0] rd_data [FRAMES]
);
  logic signed [FEAT_W-1:0] mem [DIMS][FRAMES];

  always_ff @(posedge clk) begin
    if (wr_en && wr_dim < 5'(DIMS) && wr_frame < 5'(FRAMES))
      mem[wr_dim][wr_frame] <= wr_data;
    for (int f = 0; f < FRAMES; f++)
      rd_data[f] <= (rd_dim < 5'(DIMS)) ? mem[rd_dim][f] : '0;
  end
endmodule
