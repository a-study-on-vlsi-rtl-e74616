// gmm_core: frame-parallel GMM core with compressed parameter loading.
//
// For a block of up to FRAMES look-ahead frames, computes the log output
// probability of every HMM state (STATES of them) for every frame, state by
// state, and writes one result row (all frames of one state) per state.
// Parameters of a state are read once per block and shared by all frames,
// which is what cuts the external bandwidth.
//
// Three stages run as a pipeline, each on a different state (the published
// GMM pipeline):
//   load    the memory interface streams the run-length-coded symbols of a
//           state into one of two input buffers (gmm_input_buffer);
//   decode  rle_decoder rebuilds the 832 parameters into one bank of the
//           GMM buffer (gmm_param_buffer);
//   compute FRAMES processors (gmm_pe), one per frame, read the other bank
//           in lock step: for each mixture the constant, then one
//           mean/precision pair per dimension, then a mixture-end step.
// A mixture is cut short as soon as every active processor has stopped it
// (its value fell below the best earlier mixture). The decoder and the
// processors only change state when they have work, which stands in for the
// clock gating of the chip.
//
// Block protocol: pulse start with nframes (1..FRAMES); the core then takes
// nframes*DIMS features on feat_* (frame-major, dimension-minor) into the
// MFCC buffer, computes all states and pulses done. Parameter symbols may
// arrive at any time on sym_* (state after state, sym_last on the last
// symbol of each state); they are decoded ahead while the buffers allow.
// Result rows come out on res_we/res_state/res_row (frame f in bits
// [f*GMM_W +: GMM_W]). mix_skip pulses when a mixture is cut short.
// Parameter layout inside a mixture (this implementation's choice): word 0 =
// C_m, words 1..DIMS = means, DIMS+1..2*DIMS = precisions, rest unused.
module gmm_core
  import hmm_pkg::*;
#(
  parameter int FRAMES = 20,
  parameter int STATES = 1987,
  parameter int MIX    = 16,
  parameter int DIMS   = 25
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [4:0]                nframes,
  input  logic                      feat_valid,
  output logic                      feat_ready,
  input  logic signed [FEAT_W-1:0]  feat_data,
  input  logic                      sym_valid,
  output logic                      sym_ready,
  input  logic [SYM_W-1:0]          sym_data,
  input  logic                      sym_last,
  output logic                      res_we,
  output logic [STATE_W-1:0]        res_state,
  output logic [FRAMES*GMM_W-1:0]   res_row,
  output logic                      busy,
  output logic                      done,
  output logic                      mix_skip
);
  localparam int PPM = 2*DIMS + 2;          // parameters per mixture (52)
  localparam int PPS = MIX * PPM;           // parameters per state (832)

  // ---------------- load + decode ----------------
  logic             ib_rd_valid, ib_rd_ready, ib_rd_last;
  logic [SYM_W-1:0] ib_rd_sym;

  gmm_input_buffer u_ibuf (
    .clk, .rst_n,
    .wr_valid(sym_valid), .wr_ready(sym_ready), .wr_sym(sym_data), .wr_last(sym_last),
    .rd_valid(ib_rd_valid), .rd_ready(ib_rd_ready), .rd_sym(ib_rd_sym), .rd_last(ib_rd_last)
  );

  logic               dec_out_valid, dec_out_last, dec_in_ready;
  logic [PARAM_W-1:0] dec_out_param;
  logic [9:0]         dec_out_idx;
  logic [1:0]         pfull;     // GMM buffer bank holds a decoded state
  logic               dsel, csel;
  logic               dec_go;

  // Hold the decoder for the clock in which a state's last parameter is
  // written, so the bank switch is seen before the next state's symbols.
  assign dec_go      = ib_rd_valid && !pfull[dsel] && !(dec_out_valid && dec_out_last) && dec_in_ready;
  assign ib_rd_ready = dec_go;

  rle_decoder #(.PARAMS_PER_STATE(PPS)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_go), .in_ready(dec_in_ready), .in_sym(ib_rd_sym),
    .out_valid(dec_out_valid), .out_param(dec_out_param), .out_idx(dec_out_idx), .out_last(dec_out_last)
  );

  // ---------------- buffers ----------------
  logic [9:0]         rd_addr_a, rd_addr_b;
  logic [PARAM_W-1:0] rd_data_a, rd_data_b;

  gmm_param_buffer #(.PARAMS(PPS)) u_pbuf (
    .clk,
    .wr_en(dec_out_valid), .wr_bank(dsel), .wr_addr(dec_out_idx), .wr_data(dec_out_param),
    .rd_bank(csel), .rd_addr_a, .rd_addr_b, .rd_data_a, .rd_data_b
  );

  logic                     mf_we;
  logic [4:0]               mf_wf, mf_wd, mf_rd;
  logic signed [FEAT_W-1:0] mf_q [FRAMES];

  mfcc_buffer #(.FRAMES(FRAMES), .DIMS(DIMS)) u_mfcc (
    .clk, .wr_en(mf_we), .wr_frame(mf_wf), .wr_dim(mf_wd), .wr_data(feat_data),
    .rd_dim(mf_rd), .rd_data(mf_q)
  );

  // ---------------- block control ----------------
  typedef enum logic [3:0] {C_IDLE, C_LOADF, C_WAIT, C_CLEAR, C_MSTART, C_DIM,
                            C_MEND, C_DRAIN, C_WRITE} cstate_e;
  cstate_e          cs;
  logic [4:0]       nfr;
  logic [4:0]       lf, ld;            // feature load counters
  logic [4:0]       mix;
  logic [4:0]       dim;
  logic [STATE_W-1:0] st;
  logic [1:0]       drain;

  // operation issued this clock, applied next clock when the reads return
  pe_op_e           op_issue, op_q;
  logic [FRAMES-1:0] pe_stopped, pe_bvalid;
  logic signed [GMM_W-1:0] pe_best [FRAMES];
  logic             all_stopped;

  assign feat_ready = (cs == C_LOADF);
  assign mf_we      = (cs == C_LOADF) && feat_valid;
  assign mf_wf      = lf;
  assign mf_wd      = ld;
  assign busy       = (cs != C_IDLE);

  always_comb begin
    all_stopped = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      if (5'(f) < nfr && !pe_stopped[f]) all_stopped = 1'b0;
  end

  // read addresses and operation for the issue stage
  always_comb begin
    op_issue  = PE_NOP;
    rd_addr_a = 10'(mix * PPM);
    rd_addr_b = 10'(mix * PPM + DIMS + 1 + dim);
    mf_rd     = dim;
    unique case (cs)
      C_CLEAR:  op_issue = PE_CLEAR;
      C_MSTART: op_issue = PE_MIX_START;
      C_DIM: begin
        op_issue  = PE_DIM;
        rd_addr_a = 10'(mix * PPM + 1 + dim);
      end
      C_MEND:   op_issue = PE_MIX_END;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= C_IDLE; nfr <= '0; lf <= '0; ld <= '0; mix <= '0; dim <= '0;
      st <= '0; drain <= '0; op_q <= PE_NOP;
      pfull <= '0; dsel <= 1'b0; csel <= 1'b0;
      res_we <= 1'b0; res_state <= '0; res_row <= '0; done <= 1'b0; mix_skip <= 1'b0;
    end else begin
      op_q     <= op_issue;
      res_we   <= 1'b0;
      done     <= 1'b0;
      mix_skip <= 1'b0;
      // decoder side bank bookkeeping
      if (dec_out_valid && dec_out_last) begin
        pfull[dsel] <= 1'b1;
        dsel        <= !dsel;
      end
      unique case (cs)
        C_IDLE: if (start) begin
          nfr <= (nframes == 0) ? 5'd1 : (nframes > 5'(FRAMES) ? 5'(FRAMES) : nframes);
          lf <= '0; ld <= '0; st <= '0;
          cs <= C_LOADF;
        end
        C_LOADF: if (feat_valid) begin
          if (ld == 5'(DIMS-1)) begin
            ld <= '0;
            if (lf == nfr - 5'd1) cs <= C_WAIT;
            else lf <= lf + 5'd1;
          end else ld <= ld + 5'd1;
        end
        C_WAIT: if (pfull[csel]) begin
          mix <= '0; dim <= '0;
          cs  <= C_CLEAR;
        end
        C_CLEAR:  cs <= C_MSTART;
        C_MSTART: begin dim <= '0; cs <= C_DIM; end
        C_DIM: begin
          if (dim == 5'(DIMS-1)) cs <= C_MEND;
          else if (dim >= 5'd2 && all_stopped) begin
            cs <= C_MEND; mix_skip <= 1'b1;
          end else dim <= dim + 5'd1;
        end
        C_MEND: begin
          dim <= '0;
          if (mix == 5'(MIX-1)) begin
            cs <= C_DRAIN; drain <= 2'd0;
          end else begin
            mix <= mix + 5'd1; cs <= C_MSTART;
          end
        end
        C_DRAIN: begin   // wait until the last MIX_END has updated best
          if (drain == 2'd1) cs <= C_WRITE;
          drain <= drain + 2'd1;
        end
        C_WRITE: begin
          res_we    <= 1'b1;
          res_state <= st;
          for (int f = 0; f < FRAMES; f++) res_row[f*GMM_W +: GMM_W] <= pe_best[f];
          pfull[csel] <= 1'b0;
          csel        <= !csel;
          if (st == STATE_W'(STATES-1)) begin
            cs   <= C_IDLE;
            done <= 1'b1;
          end else begin
            st <= st + 1'b1;
            cs <= C_WAIT;
          end
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  // ---------------- processors ----------------
  for (genvar f = 0; f < FRAMES; f++) begin : g_pe
    gmm_pe #(.OUT_W(GMM_W)) u_pe (
      .clk, .rst_n,
      .op(op_q), .c_in(rd_data_a), .x(mf_q[f]), .mu(rd_data_a[FEAT_W-1:0]),
      .prec(rd_data_b[15:0]),
      .stopped(pe_stopped[f]), .best_valid(pe_bvalid[f]), .best(pe_best[f])
    );
  end
endmodule
