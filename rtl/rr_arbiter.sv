// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per clock (one-hot gnt, combinational from
// req). The search starts just after the requester granted last, so every
// requester is served within N grants. The priority pointer moves only when
// accept is high (the granted request was actually taken).
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic         any
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int i = 1; i <= N; i++) begin
      int unsigned j;
      j = (int'(last) + i) % N;
      if (!any && req[j]) begin
        any     = 1'b1;
        gnt[j]  = 1'b1;
        gnt_idx = IW'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              last <= IW'(N-1);
    else if (any && accept)  last <= gnt_idx;
  end
endmodule
