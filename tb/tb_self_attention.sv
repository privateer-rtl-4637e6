// tb_self_attention -- self-checking test of the Linear-layer self-attention.
//
// Random query/key/value/output-projection weights are written through the
// load port (query weights scaled by 1/D, standing for 1/sqrt(D) folded into
// a 1/sqrt(D)-scaled layer), then four sequences of 12 x 32 random words are
// streamed in back to back.  Each output word is compared with the
// floating-point model softmax(Q K^T) V Wo + bo within 1e-3 (plus 1e-3 of the
// value).  The output sees random back-pressure.  The test also requires
// that the key and value weights were loaded once per sequence.
module tb_self_attention;
  import attae_pkg::*;
  import attae_ref_pkg::*;
  localparam int NT_ = 12, D_ = 32, NSEQ = 4, WORDS = NT_ * D_;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t in_data, out_data, w_data; logic in_valid, in_ready, out_valid, out_ready, w_we;
  layer_id_e w_layer; logic [15:0] w_addr;
  self_attention #(.NT(NT_), .D(D_), .AW(16)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t wq, bq, wk, bk, wv, bv, wo, bo;
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

  int n_fed = 0, n_got = 0, n_kload = 0;
  bit run = 0;
  logic kq = 0;
  always @(negedge clk) if (run) begin
    in_valid  <= (n_fed < NSEQ * WORDS);
    in_data   <= r2q(xin[(n_fed < NSEQ * WORDS) ? n_fed / WORDS : 0][n_fed % WORDS]);
    out_ready <= ($urandom % 4 != 0);
  end
  always @(posedge clk) if (run) begin
    kq <= dut.kw_ok;
    if (dut.kw_ok && !kq) n_kload++;
    if (in_valid && in_ready) n_fed++;
    if (out_valid && out_ready) begin
      real g, e, tol;
      g = q2r(out_data); e = yexp[n_got / WORDS][n_got % WORDS];
      tol = 1e-3 + 1e-3 * ((e < 0) ? -e : e);
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
    for (int s = 0; s < NSEQ; s++) begin
      vec_t q, k, v;
      xin[s] = rand_vec(WORDS, (s == 2) ? 6.0 : 1.5);
      q = linear(xin[s], NT_, D_, D_, wq, bq);
      k = linear(xin[s], NT_, D_, D_, wk, bk);
      v = linear(xin[s], NT_, D_, D_, wv, bv);
      yexp[s] = linear(attention(q, k, v, NT_, D_), NT_, D_, D_, wo, bo);
    end
    repeat (3) @(posedge clk); rst_n <= 1;
    load(L_Q, wq, bq); load(L_K, wk, bk); load(L_V, wv, bv); load(L_OPROJ, wo, bo);
    w_we <= 0;
    @(posedge clk);
    run = 1;
    wait (n_got == NSEQ * WORDS);
    checks++;
    if (n_kload != NSEQ) begin failures++; $display("key loads %0d", n_kload); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
