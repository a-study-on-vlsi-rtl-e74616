// rle_decoder: rebuilds GMM parameters from the run-length-coded stream.
//
// Only the top half of each 32-bit parameter is run-length coded, because
// neighbouring parameters of a state (means, precisions) tend to share their
// upper bits; the low half is always sent. The stream is a sequence of
// 18-bit symbols {tag[1:0], payload[15:0]}:
//   SYM_RUN  sets the top half used by every following parameter (a new run);
//   SYM_LIT  gives the top half of the next parameter only (a literal);
//   SYM_LOW  gives a low half and emits one parameter.
// So a parameter that opens a run or is a literal takes two symbols, one
// inside a run takes one, and a state of 832 parameters takes at most 1664
// decoder steps, as the published design requires. The three cases follow
// the published decoder; the symbol layout and the 16/16 split are this
// implementation's choice.
//
// Timing: one symbol per clock (in_ready is 1 out of reset). A parameter
// appears on out_* the clock after its SYM_LOW symbol. out_idx counts the
// parameters of a state and wraps after PARAMS_PER_STATE, with out_last on
// the final one; the current run value is cleared at every state boundary.
module rle_decoder
  import hmm_pkg::*;
#(
  parameter int TOP_W            = 16,
  parameter int PARAMS_PER_STATE = 832
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [SYM_W-1:0]        in_sym,
  output logic                    out_valid,
  output logic [PARAM_W-1:0]      out_param,
  output logic [9:0]              out_idx,
  output logic                    out_last
);
  localparam int LOW_W = PARAM_W - TOP_W;

  logic [TOP_W-1:0] run_top;
  logic [TOP_W-1:0] lit_top;
  logic             lit_pending;
  logic [9:0]       idx;

  sym_tag_e   tag;
  logic [15:0] payload;
  assign tag     = sym_tag_e'(in_sym[SYM_W-1 -: 2]);
  assign payload = in_sym[15:0];
  assign in_ready = rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_top     <= '0;
      lit_top     <= '0;
      lit_pending <= 1'b0;
      idx         <= '0;
      out_valid   <= 1'b0;
      out_param   <= '0;
      out_idx     <= '0;
      out_last    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        unique case (tag)
          SYM_RUN: begin
            run_top     <= payload[TOP_W-1:0];
            lit_pending <= 1'b0;
          end
          SYM_LIT: begin
            lit_top     <= payload[TOP_W-1:0];
            lit_pending <= 1'b1;
          end
          SYM_LOW: begin
            out_valid   <= 1'b1;
            out_param   <= {(lit_pending ? lit_top : run_top), payload[LOW_W-1:0]};
            out_idx     <= idx;
            lit_pending <= 1'b0;
            if (idx == 10'(PARAMS_PER_STATE - 1)) begin
              idx      <= '0;
              out_last <= 1'b1;
              run_top  <= '0;
            end else begin
              idx <= idx + 10'd1;
            end
          end
          default: ;  // reserved tag: ignored
        endcase
      end
    end
  end
endmodule
