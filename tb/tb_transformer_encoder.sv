// tb_transformer_encoder -- self-checking test of one transformer encoder layer.
//
// Random weights for attention (query weights scaled by an extra 1/sqrt(D),
// the folded score scaling), feed-forward layers and both LayerNorms are
// written through the load port, then four sequences of 12 x 32 random
// words are streamed in back to back.  Each output word is compared with the
// floating-point model h = LN1(x + Attn(x)), y = h + LN2(FF2(ReLU(FF1(h))))
// within 2e-3 (plus 2e-3 of the value), under random output back-pressure.
// Both skip paths must have carried every word.
module tb_transformer_encoder;
  import attae_pkg::*;
  import attae_ref_pkg::*;
  localparam int NT_ = 12, D_ = 32, DFF_ = 64, NSEQ = 4, WORDS = NT_ * D_;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t in_data, out_data, w_data; logic in_valid, in_ready, out_valid, out_ready, w_we;
  layer_id_e w_layer; logic [15:0] w_addr;
  transformer_encoder #(.NT(NT_), .D(D_), .DFF(DFF_), .AW(16)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t wq, bq, wk, bk, wv, bv, wo, bo, w1, b1, w2, b2, g1, e1, g2, e2;
  vec_t xin [NSEQ], yexp [NSEQ];

  function automatic vec_t rand_vec(input int n, input real a);
    vec_t v = new[n];
    foreach (v[i]) v[i] = q2r(r2q((real'($urandom % 200001) / 100000.0 - 1.0) * a));
    return v;
  endfunction

  task automatic load(input layer_id_e l, input vec_t w, input vec_t b);
    for (int i = 0; i < w.size() + b.size(); i++) begin
      w_we <= 1; w_layer <= l; w_addr <= 16'(i);
      w_data <= r2q((i < w.size()) ? w[i] : b[i - w.size()]);
      @(posedge clk);
    end
  endtask

  int n_fed = 0, n_got = 0, n_kload = 0, n_res2 = 0;
  bit run = 0;
  always @(negedge clk) if (run) begin
    in_valid  <= (n_fed < NSEQ * WORDS);
    in_data   <= r2q(xin[(n_fed < NSEQ * WORDS) ? n_fed / WORDS : 0][n_fed % WORDS]);
    out_ready <= ($urandom % 4 != 0);
  end
  always @(posedge clk) if (run) begin
    if (dut.s1_v && dut.s1_r) n_kload++;
    if (dut.r2_v && dut.r2_r) n_res2++;
    if (in_valid && in_ready) n_fed++;
    if (out_valid && out_ready) begin
      real g, e, tol;
      g = q2r(out_data); e = yexp[n_got / WORDS][n_got % WORDS];
      tol = 2e-3 + 2e-3 * ((e < 0) ? -e : e);
      checks++;
      if (g - e > tol || e - g > tol) begin
        failures++;
        if (failures < 20) $display("word %0d: got %f exp %f", n_got, g, e);
      end
      n_got++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; w_we = 0; w_layer = L_Q; w_addr = '0; w_data = '0;
    wq = rand_vec(D_ * D_, 1.0 / D_);          bq = rand_vec(D_, 0.02);
    wk = rand_vec(D_ * D_, 1.0 / $sqrt(D_));   bk = rand_vec(D_, 0.1);
    wv = rand_vec(D_ * D_, 1.0 / $sqrt(D_));   bv = rand_vec(D_, 0.1);
    wo = rand_vec(D_ * D_, 1.0 / $sqrt(D_));   bo = rand_vec(D_, 0.1);
    w1 = rand_vec(DFF_ * D_, 1.0 / $sqrt(D_)); b1 = rand_vec(DFF_, 0.1);
    w2 = rand_vec(D_ * DFF_, 1.0 / $sqrt(DFF_)); b2 = rand_vec(D_, 0.1);
    g1 = rand_vec(D_, 0.3); e1 = rand_vec(D_, 0.2);
    g2 = rand_vec(D_, 0.3); e2 = rand_vec(D_, 0.2);
    foreach (g1[i]) begin g1[i] += 1.0; g2[i] += 1.0; end
    for (int s = 0; s < NSEQ; s++) begin
      vec_t q, k, v;
      xin[s] = rand_vec(WORDS, (s == 2) ? 6.0 : 1.5);
      q = linear(xin[s], NT_, D_, D_, wq, bq);
      k = linear(xin[s], NT_, D_, D_, wk, bk);
      v = linear(xin[s], NT_, D_, D_, wv, bv);
      begin
        vec_t h, f;
        h = layer_norm(add(xin[s], linear(attention(q, k, v, NT_, D_), NT_, D_, D_, wo, bo)), NT_, D_, g1, e1);
        f = linear(relu(linear(h, NT_, D_, DFF_, w1, b1)), NT_, DFF_, D_, w2, b2);
        yexp[s] = add(h, layer_norm(f, NT_, D_, g2, e2));
      end
    end
    repeat (3) @(posedge clk); rst_n <= 1;
    load(L_Q, wq, bq); load(L_K, wk, bk); load(L_V, wv, bv); load(L_OPROJ, wo, bo);
    load(L_FF1, w1, b1); load(L_FF2, w2, b2); load(L_LN1, g1, e1); load(L_LN2, g2, e2);
    w_we <= 0;
    @(posedge clk);
    run = 1;
    wait (n_got == NSEQ * WORDS);
    checks++;
    if (n_kload != NSEQ * WORDS) begin failures++; $display("first skip words %0d", n_kload); end
    checks++;
    if (n_res2 != NSEQ * WORDS) begin failures++; $display("second skip words %0d", n_res2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
