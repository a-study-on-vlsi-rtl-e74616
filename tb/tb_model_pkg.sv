// tb_model_pkg: reference models and generated data for the testbenches.
//
// Everything here is computed from formulas, so no data files are needed:
//   - GMM parameters of state s (gen_param) and features (gen_feat);
//   - a run-length encoder for a state's parameters (encode_state) that
//     produces the symbol stream the decoder expects;
//   - a reference GMM score (gmm_ref): max over mixtures of
//     C_m - sum_d ((x_d - mu_md)^2 * P_md >> 16), saturated to 24 bits;
//   - a small lexicon for the Viterbi tests: word w has three state nodes
//     4w, 4w+1, 4w+2 (start, middle, end); dictionary, n-gram lists and
//     n-gram entries follow the formulas in dict_rec, word_rec, ngram_rec.
package tb_model_pkg;
  import hmm_pkg::*;

  localparam int DIMS = 25;
  localparam int PPM  = 52;

  function automatic logic [31:0] gen_param(int s, int idx);
    int m, w, d;
    m = idx / PPM;
    w = idx % PPM;
    if (w == 0) return 32'(-(400 + (s * 37 + m * 11) % 500));
    if (w <= DIMS) begin
      d = w - 1;
      return 32'(((s * 13 + m * 7 + d * 5) % 180) - 15);      // mean, mostly >= 0
    end
    if (w <= 2 * DIMS) begin
      d = w - 1 - DIMS;
      return 32'(64 + (s + m * 3 + d * 7) % 128);             // precision, Q.16
    end
    return 32'(0);
  endfunction

  function automatic logic signed [15:0] gen_feat(int f, int d);
    return 16'(((f * 29 + d * 11 + 3) % 170) - 10);
  endfunction

  // Encode 832 parameters: RUN when the next parameter shares the new top
  // half, LIT for an isolated top half, LOW alone inside a run.
  function automatic void encode_state(input int s, output logic [17:0] sym [2048], output int n);
    logic [15:0] run_top, top, ntop;
    run_top = 16'h0;
    n = 0;
    for (int i = 0; i < PPM * 16; i++) begin
      logic [31:0] p;
      p   = gen_param(s, i);
      top = p[31:16];
      ntop = (i + 1 < PPM * 16) ? gen_param(s, i + 1) >> 16 : top;
      if (top != run_top) begin
        if (ntop == top) begin
          sym[n] = {2'b01, top}; n++; run_top = top;
        end else begin
          sym[n] = {2'b10, top}; n++;
        end
      end
      sym[n] = {2'b00, p[15:0]}; n++;
    end
  endfunction

  function automatic logic signed [23:0] gmm_ref(int s, logic signed [15:0] x [DIMS]);
    longint best;
    bit     have;
    have = 0; best = 0;
    for (int m = 0; m < 16; m++) begin
      longint acc;
      acc = longint'(signed'(gen_param(s, m * PPM)));
      for (int d = 0; d < DIMS; d++) begin
        longint diff, pr;
        diff = longint'(x[d]) - longint'(signed'(gen_param(s, m * PPM + 1 + d)));
        pr   = longint'(gen_param(s, m * PPM + 1 + DIMS + d));
        acc  = acc - ((diff * diff * pr) >>> 16);
      end
      if (!have || acc > best) begin best = acc; have = 1; end
    end
    if (best > 8388607) best = 8388607;
    if (best < -8388608) best = -8388608;
    return 24'(best);
  endfunction

  // ---------------- lexicon ----------------
  function automatic node_info_t dict_rec(int node, int states);
    node_info_t r;
    int w, k;
    w = node / 4; k = node % 4;
    r.state    = 11'((node * 7 + 3) % states);
    r.self_lp  = 16'(-(6 + node % 7));
    r.next_lp  = 16'(-(9 + node % 5));
    r.is_start = (k == 0);
    r.word_end = (k == 2);
    r.word_id  = 16'(w);
    return r;
  endfunction

  function automatic word_info_t word_rec(int w);
    word_info_t r;
    r.base  = 24'(w * 16);
    r.count = 16'(1 + w % 5);
    return r;
  endfunction

  function automatic word_info_t word3_rec(int pred, int w);
    word_info_t r;
    r.base  = 24'(24'h800000 + ((pred * 64 + w) % 65536) * 4);
    r.count = ((pred + w) % 3 == 0) ? 16'd2 : 16'd0;
    return r;
  endfunction

  function automatic ngram_t ngram_rec(int id, int words);
    ngram_t r;
    r.dest  = 20'(((id * 13 + 5) % words) * 4);
    r.score = 8'((id * 7) % 50);
    return r;
  endfunction
endpackage
