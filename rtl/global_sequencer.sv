// global_sequencer: elastic pipeline between the GMM and Viterbi cores.
//
// The utterance is cut into blocks of `lookahead` frames (the last one may
// be shorter). The GMM core computes a whole block into one bank of the GMM
// result double buffer; the Viterbi core then works through that block frame
// by frame, while the GMM core already computes the next block into the
// other bank. A bank is reused only after the Viterbi core has finished
// every frame in it. So either core can run ahead of the other by up to one
// block, and a frame with much Viterbi work borrows the idle time of
// lighter frames (the published elastic pipeline). The block size is a
// run-time setting (1..FRAMES), as in the published variable look-ahead.
//
// Protocol: pulse start with total_frames > 0 and lookahead; the sequencer
// pulses vit_init once, then issues gmm_start / vit_frame_start and waits for
// gmm_done / vit_frame_done; done pulses after the last frame.
// overlap is high in clocks where both cores are working; vit_wait is high
// while the Viterbi core waits for a GMM block.
module global_sequencer #(
  parameter int FRAMES = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] total_frames,
  input  logic [4:0]  lookahead,
  // GMM core
  output logic        gmm_start,
  output logic [4:0]  gmm_nframes,
  output logic        gmm_bank,
  input  logic        gmm_done,
  // Viterbi core
  output logic        vit_init,
  output logic        vit_frame_start,
  output logic [15:0] vit_frame_no,
  output logic        vit_bank,
  output logic [4:0]  vit_col,
  input  logic        vit_frame_done,
  output logic        busy,
  output logic        done,
  output logic        overlap,
  output logic        vit_wait
);
  logic [4:0]  la;
  logic [15:0] total;
  logic [15:0] g_next;     // first frame of the next GMM block
  logic        g_busy;
  logic [15:0] v_frame;    // next frame for the Viterbi core
  logic        v_busy;
  logic [1:0]  ready;      // bank holds a finished block
  logic [4:0]  blk_len [2];
  logic        run;

  logic [15:0] g_left;
  logic [4:0]  g_len;
  assign g_left = total - g_next;
  assign g_len  = (g_left < 16'(la)) ? g_left[4:0] : la;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= 5'd1; total <= '0; g_next <= '0; g_busy <= 1'b0; v_frame <= '0; v_busy <= 1'b0;
      ready <= '0; blk_len[0] <= '0; blk_len[1] <= '0; run <= 1'b0;
      gmm_start <= 1'b0; gmm_nframes <= '0; gmm_bank <= 1'b0;
      vit_init <= 1'b0; vit_frame_start <= 1'b0; vit_frame_no <= '0; vit_bank <= 1'b0;
      vit_col <= '0; done <= 1'b0;
    end else begin
      gmm_start       <= 1'b0;
      vit_init        <= 1'b0;
      vit_frame_start <= 1'b0;
      done            <= 1'b0;
      if (start && !run) begin
        la      <= (lookahead == 0) ? 5'd1 : (lookahead > 5'(FRAMES) ? 5'(FRAMES) : lookahead);
        total   <= total_frames;
        g_next  <= '0;
        v_frame <= '0;
        g_busy  <= 1'b0;
        v_busy  <= 1'b0;
        ready   <= '0;
        gmm_bank <= 1'b1;          // first block goes to bank 0 (toggled at issue)
        run     <= (total_frames != 0);
        vit_init <= 1'b1;
      end else if (run) begin
        // GMM side: next block into the other bank once that bank is free
        if (!g_busy && g_next < total && !ready[!gmm_bank] &&
            !(v_busy && vit_bank == !gmm_bank)) begin
          gmm_start   <= 1'b1;
          gmm_nframes <= g_len;
          gmm_bank    <= !gmm_bank;
          blk_len[!gmm_bank] <= g_len;
          g_next      <= g_next + 16'(g_len);
          g_busy      <= 1'b1;
        end
        if (gmm_done) begin
          g_busy          <= 1'b0;
          ready[gmm_bank] <= 1'b1;
        end
        // Viterbi side: frame by frame through a ready bank
        if (!v_busy && !vit_init && ready[vit_bank]) begin
          vit_frame_start <= 1'b1;
          vit_frame_no    <= v_frame;
          v_busy          <= 1'b1;
        end
        if (vit_frame_done) begin
          v_busy  <= 1'b0;
          v_frame <= v_frame + 1'b1;
          if (vit_col + 5'd1 == blk_len[vit_bank]) begin
            ready[vit_bank] <= 1'b0;
            vit_bank        <= !vit_bank;
            vit_col         <= '0;
          end else begin
            vit_col <= vit_col + 5'd1;
          end
          if (v_frame + 1'b1 == total) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
      if (start && !run) begin
        vit_bank <= 1'b0;
        vit_col  <= '0;
      end
    end
  end

  assign busy     = run;
  assign overlap  = run && g_busy && v_busy;
  assign vit_wait = run && !v_busy && !ready[vit_bank];
endmodule
