// gmm_input_buffer: ping-pong pair of buffers for compressed GMM states.
//
// The memory interface writes the compressed symbols of one HMM state into
// one buffer while the decoder drains the other, so loading state n+1
// overlaps decoding state n (the published GMM pipeline). A buffer becomes
// readable once the state's last symbol (wr_last) is written; it is free
// again once the decoder has taken that last symbol. Buffers are used
// strictly in turn.
//
// Interface: valid/ready streams on both sides. Write side accepts one
// symbol per clock while the current write buffer is free. Read side: the
// symbol at the head is presented combinationally from a registered read,
// one symbol per clock. Symbols beyond DEPTH in one state are dropped.
// Sizes are this implementation's choice, taken from the published 36 Kb
// for the two buffers (2 x 1024 x 18 bit).
module gmm_input_buffer
  import hmm_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [SYM_W-1:0] wr_sym,
  input  logic             wr_last,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [SYM_W-1:0] rd_sym,
  output logic             rd_last
);
  localparam int AW = $clog2(DEPTH);

  logic [SYM_W-1:0] mem [2][DEPTH];
  logic [1:0]       full;          // buffer holds a complete state
  logic [AW:0]      len  [2];      // symbols in each buffer
  logic             wsel, rsel;
  logic [AW:0]      wptr, rptr;

  // read side: a small output register stage
  logic             ov;            // output register valid
  logic [SYM_W-1:0] osym;
  logic             olast;

  assign wr_ready = !full[wsel];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready && wptr < (AW+1)'(DEPTH))
      mem[wsel][wptr[AW-1:0]] <= wr_sym;
  end

  logic fetch;   // move next symbol into the output register
  assign fetch = full[rsel] && (rptr < len[rsel]) && (!ov || rd_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      len[0] <= '0; len[1] <= '0;
      wsel  <= 1'b0;
      rsel  <= 1'b0;
      wptr  <= '0;
      rptr  <= '0;
      ov    <= 1'b0;
      osym  <= '0;
      olast <= 1'b0;
    end else begin
      // write side
      if (wr_valid && wr_ready) begin
        if (wptr < (AW+1)'(DEPTH)) wptr <= wptr + 1'b1;
        if (wr_last) begin
          full[wsel] <= 1'b1;
          len[wsel]  <= (wptr < (AW+1)'(DEPTH)) ? wptr + 1'b1 : wptr;
          wsel       <= !wsel;
          wptr       <= '0;
        end
      end
      // read side
      if (ov && rd_ready && !fetch) ov <= 1'b0;
      if (fetch) begin
        ov    <= 1'b1;
        osym  <= mem[rsel][rptr[AW-1:0]];
        olast <= (rptr + 1'b1 == len[rsel]);
        if (rptr + 1'b1 == len[rsel]) begin
          full[rsel] <= 1'b0;
          rsel       <= !rsel;
          rptr       <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  assign rd_valid = ov;
  assign rd_sym   = osym;
  assign rd_last  = olast;
endmodule
