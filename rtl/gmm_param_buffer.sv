// gmm_param_buffer: decoded GMM parameters of one state, two banks.
//
// The decoder writes the 832 parameters of state n into one bank while the
// frame-parallel processors read state n-1 from the other. The published
// design holds one decoded state in a buffer and copies it to a register
// before computing; this implementation uses two banks instead, which gives
// the same overlap without the copy.
//
// Interface: one write port; two read ports (A and B) on the same bank, so a
// mean and its precision are read in the same clock. Reads are registered:
// data appears the clock after the address.
module gmm_param_buffer
  import hmm_pkg::*;
#(
  parameter int PARAMS = 832
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic               wr_bank,
  input  logic [9:0]         wr_addr,
  input  logic [PARAM_W-1:0] wr_data,
  input  logic               rd_bank,
  input  logic [9:0]         rd_addr_a,
  input  logic [9:0]         rd_addr_b,
  output logic [PARAM_W-1:0] rd_data_a,
  output logic [PARAM_W-1:0] rd_data_b
);
  logic [PARAM_W-1:0] mem [2][PARAMS];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < 10'(PARAMS)) mem[wr_bank][wr_addr] <= wr_data;
    rd_data_a <= (rd_addr_a < 10'(PARAMS)) ? mem[rd_bank][rd_addr_a] : '0;
    rd_data_b <= (rd_addr_b < 10'(PARAMS)) ? mem[rd_bank][rd_addr_b] : '0;
  end
endmodule
