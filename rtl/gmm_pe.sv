// gmm_pe: one GMM computation processor (max-mixture approximation).
//
// Computes, for one frame, log b_s(x) = max_m { C_m - sum_d (x_d - mu_md)^2
// * P_md } with P_md = 1/(2 sigma_md^2), the max approximation of the
// published design that replaces the add-log table. Because every term of
// the sum is non-negative, a mixture's partial value only falls; once it is
// below the best value of the earlier mixtures the mixture cannot win, and
// the processor marks it stopped and ignores its remaining dimensions (the
// published early termination).
//
// Operations, one per clock (op, with operands valid in the same clock):
//   PE_CLEAR      forget the best value (start of a state)
//   PE_MIX_START  acc <= C_m
//   PE_DIM        acc <= acc - ((x - mu)^2 * prec) >> 16, unless stopped
//   PE_MIX_END    best <= max(best, acc) unless stopped
// Number formats (this implementation's choice): x and mu 16-bit signed in
// the same unit, prec 16-bit unsigned with 16 fraction bits, C_m 32-bit
// signed; best is saturated to OUT_W bits on the output.
module gmm_pe
  import hmm_pkg::*;
#(
  parameter int ACC_W = 40,
  parameter int OUT_W = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  pe_op_e                   op,
  input  logic signed [31:0]       c_in,
  input  logic signed [FEAT_W-1:0] x,
  input  logic signed [FEAT_W-1:0] mu,
  input  logic [15:0]              prec,
  output logic                     stopped,
  output logic                     best_valid,
  output logic signed [OUT_W-1:0]  best
);
  logic signed [ACC_W-1:0] acc, best_acc;
  logic signed [FEAT_W:0]  diff;
  logic [2*FEAT_W+1:0]     sq;       // (x-mu)^2, at most 2^32
  logic [2*FEAT_W+17:0]    prod;
  logic signed [ACC_W-1:0] term;
  logic signed [ACC_W-1:0] acc_next;

  always_comb begin
    diff     = {x[FEAT_W-1], x} - {mu[FEAT_W-1], mu};
    sq       = (2*FEAT_W+2)'($unsigned(diff * diff));
    prod     = sq * prec;
    term     = ACC_W'(prod >> 16);
    acc_next = acc - term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      best_acc   <= '0;
      best_valid <= 1'b0;
      stopped    <= 1'b0;
    end else begin
      unique case (op)
        PE_CLEAR: begin
          best_valid <= 1'b0;
          stopped    <= 1'b0;
        end
        PE_MIX_START: begin
          acc     <= ACC_W'(c_in);
          stopped <= 1'b0;
        end
        PE_DIM: if (!stopped) begin
          acc <= acc_next;
          if (best_valid && acc_next < best_acc) stopped <= 1'b1;
        end
        PE_MIX_END: if (!stopped && (!best_valid || acc > best_acc)) begin
          best_acc   <= acc;
          best_valid <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(64'sd1 <<< (OUT_W-1));
  always_comb begin
    if (best_acc > OMAX)      best = OMAX[OUT_W-1:0];
    else if (best_acc < OMIN) best = OMIN[OUT_W-1:0];
    else                      best = best_acc[OUT_W-1:0];
  end
endmodule
