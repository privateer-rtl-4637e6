// tb_privateer_top -- end-to-end test of the whole design at its default size.
//
// Anomaly detection: random weights (scaled by 1/sqrt(fan-in), the query
// weights also by 1/sqrt(D)), a sinusoidal positional-encoding table and
// random LayerNorm gamma/beta are written through the load port.  Six
// sequences of 12 x 8 features go through back to back: "normal" ones of
// small amplitude and "attack" ones of large amplitude.  A floating-point
// model of the same network (attae_ref_pkg) gives the expected
// reconstruction of every word and the expected mean squared error; the
// threshold is set between the normal and attack scores, and each
// sequence's anomaly flag is checked.  The reconstruction output sees
// random back-pressure during the second half.
//
// Security blocks: the voted PUF response for three challenges is checked
// against the per-bit majority of the raw responses the PUF model gave,
// and the power waster must toggle only while enabled.
//
// Mechanisms counted (each must occur at least once): input stall,
// output back-pressure, key and value weight loads, query rows waiting for
// keys, softmax rows, LayerNorm vectors, residual additions, anomaly and
// normal decisions, PUF bits corrected by voting, waster activity.
module tb_privateer_top;
  import attae_pkg::*;
  import attae_ref_pkg::*;

  localparam int NSEQ = 6;
  localparam int NT_ = 12, F_ = 8, D_ = 32, DFF_ = 64, DDEC_ = 16;
  localparam int WORDS = NT_ * F_;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DUT signals
  q_t feat_data, recon_data, score, w_data;
  logic feat_valid, feat_ready, recon_valid, recon_ready, score_valid, anomaly, w_we;
  logic [4:0] w_layer; logic [15:0] w_addr;
  logic puf_start, puf_busy, puf_resp_valid, puf_req, puf_ack, waste_en, waste_out;
  logic [31:0] puf_chal_in, puf_challenge;
  logic [255:0] puf_response, puf_raw;

  privateer_top dut (.*);

  puf_cell_model #(.RESP_W(256), .CHAL_W(32)) u_puf (
    .clk, .req(puf_req), .challenge(puf_challenge), .ack(puf_ack), .resp(puf_raw));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model parameters ----------------
  vec_t w_emb, b_emb, pe, wq, bq, wk, bk, wv, bv, wo, bo, g1, be1, wf1, bf1, wf2, bf2,
        g2, be2, g3, be3, wd1, bd1, wd2, bd2;
  vec_t xin [NSEQ];
  vec_t yexp [NSEQ];
  real  mse [NSEQ];

  // quantised random value in [-a, a]
  function automatic real qrand(input real a);
    return q2r(r2q((real'($urandom % 200001) / 100000.0 - 1.0) * a));
  endfunction

  function automatic vec_t rand_vec(input int n, input real a, input real base = 0.0);
    vec_t v = new[n];
    foreach (v[i]) v[i] = base + qrand(a);
    return v;
  endfunction

  task automatic wr(input layer_id_e l, input int a, input real v);
    w_we <= 1; w_layer <= 5'(l); w_addr <= 16'(a); w_data <= r2q(v);
    @(posedge clk);
  endtask

  task automatic load_linear(input layer_id_e l, input int fin, input int fout, input vec_t w, input vec_t b);
    for (int i = 0; i < fin * fout; i++) wr(l, i, w[i]);
    for (int i = 0; i < fout; i++) wr(l, fin * fout + i, b[i]);
  endtask

  task automatic load_ln(input layer_id_e l, input vec_t g, input vec_t b);
    for (int i = 0; i < D_; i++) wr(l, i, g[i]);
    for (int i = 0; i < D_; i++) wr(l, D_ + i, b[i]);
  endtask

  function automatic vec_t model(input vec_t x);
    vec_t e, q, k, v, a, o, h, f, y, n;
    e = add(linear(x, NT_, F_, D_, w_emb, b_emb), pe);
    q = linear(e, NT_, D_, D_, wq, bq);
    k = linear(e, NT_, D_, D_, wk, bk);
    v = linear(e, NT_, D_, D_, wv, bv);
    a = attention(q, k, v, NT_, D_);
    o = linear(a, NT_, D_, D_, wo, bo);
    h = layer_norm(add(e, o), NT_, D_, g1, be1);
    f = linear(relu(linear(h, NT_, D_, DFF_, wf1, bf1)), NT_, DFF_, D_, wf2, bf2);
    y = add(h, layer_norm(f, NT_, D_, g2, be2));
    n = layer_norm(y, NT_, D_, g3, be3);
    return linear(relu(linear(n, NT_, D_, DDEC_, wd1, bd1)), NT_, DDEC_, F_, wd2, bd2);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_in_stall = 0, n_out_bp = 0, n_kload = 0, n_vload = 0, n_qwait = 0;
  int n_smax = 0, n_ln = 0, n_res = 0, n_anom = 0, n_norm = 0, n_puf_fix = 0, n_waste = 0;
  logic kok_q = 0, vok_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (feat_valid && !feat_ready) n_in_stall++;
    if (recon_valid && !recon_ready) n_out_bp++;
    if (dut.u_accel.u_enc.u_attn.kw_ok && !kok_q) n_kload++;
    if (dut.u_accel.u_enc.u_attn.vw_ok && !vok_q) n_vload++;
    kok_q <= dut.u_accel.u_enc.u_attn.kw_ok;
    vok_q <= dut.u_accel.u_enc.u_attn.vw_ok;
    if (dut.u_accel.u_enc.u_attn.qf_v && !dut.u_accel.u_enc.u_attn.kw_ok) n_qwait++;
    if (dut.u_accel.u_enc.u_attn.p_v && dut.u_accel.u_enc.u_attn.p_r) n_smax++;
    if (dut.u_accel.u_ln3.out_valid && dut.u_accel.u_ln3.out_ready) n_ln++;
    if (dut.u_accel.u_enc.s1_v && dut.u_accel.u_enc.s1_r) n_res++;
  end

  // ---------------- stimulus and checking ----------------
  int n_fed = 0, n_got = 0, n_scores = 0;
  bit run = 0, bp = 0;
  bit hs_in, hs_out;
  real thr;
  longint t_first_in [NSEQ], t_score [NSEQ];

  always @(negedge clk) if (run) begin
    feat_valid  <= (n_fed < NSEQ * WORDS);
    feat_data   <= r2q(xin[(n_fed < NSEQ * WORDS) ? n_fed / WORDS : 0][n_fed % WORDS]);
    recon_ready <= !bp || ($urandom % 3 != 0);
  end

  always @(posedge clk) if (run) begin
    if (feat_valid && feat_ready) begin
      if (n_fed % WORDS == 0) t_first_in[n_fed / WORDS] = cyc;
      n_fed++;
    end
    if (recon_valid && recon_ready) begin
      real g, e, tol;
      int s, i;
      s = n_got / WORDS; i = n_got % WORDS;
      g = q2r(recon_data); e = yexp[s][i];
      tol = 2e-3 + 2e-3 * ((e < 0) ? -e : e);
      checks++;
      if (g - e > tol || e - g > tol) begin
        failures++;
        if (failures < 20) $display("seq %0d word %0d: got %f exp %f", s, i, g, e);
      end
      n_got++;
      if (n_got == NSEQ * WORDS / 2) bp = 1;
    end
    if (score_valid) begin
      real gs;
      gs = q2r(score);
      t_score[n_scores] = cyc;
      checks++;
      if (gs - mse[n_scores] > 2e-3 + 5e-3 * mse[n_scores] || mse[n_scores] - gs > 2e-3 + 5e-3 * mse[n_scores]) begin
        failures++;
        $display("seq %0d: score %f exp %f", n_scores, gs, mse[n_scores]);
      end
      checks++;
      if (anomaly != (mse[n_scores] > thr)) begin
        failures++;
        $display("seq %0d: anomaly %0d, mse %f thr %f", n_scores, anomaly, mse[n_scores], thr);
      end
      if (anomaly) n_anom++; else n_norm++;
      n_scores++;
    end
  end

  // PUF and power waster
  task automatic puf_round(input logic [31:0] ch);
    int h0;
    logic [255:0] maj;
    h0 = u_puf.history.size();
    puf_chal_in <= ch; puf_start <= 1;
    @(posedge clk);
    puf_start <= 0;
    while (!puf_resp_valid) @(posedge clk);
    checks++;
    if (u_puf.history.size() - h0 != 5) begin
      failures++; $display("PUF asked %0d times", u_puf.history.size() - h0);
    end
    for (int b = 0; b < 256; b++) begin
      int ones = 0;
      for (int r = h0; r < u_puf.history.size(); r++) ones += u_puf.history[r][b];
      maj[b] = (ones >= 3);
      if (ones != 0 && ones != 5) n_puf_fix++;
    end
    checks++;
    if (puf_response !== maj) begin failures++; $display("PUF response differs from majority"); end
  endtask

  initial begin
    feat_valid = 0; feat_data = '0; recon_ready = 0; w_we = 0; w_layer = '0; w_addr = '0; w_data = '0;
    puf_start = 0; puf_chal_in = '0; waste_en = 0;
    // parameters
    w_emb = rand_vec(D_ * F_, 1.0 / $sqrt(F_));  b_emb = rand_vec(D_, 0.1);
    wq = rand_vec(D_ * D_, 1.0 / D_);            bq = rand_vec(D_, 0.02);
    wk = rand_vec(D_ * D_, 1.0 / $sqrt(D_));     bk = rand_vec(D_, 0.1);
    wv = rand_vec(D_ * D_, 1.0 / $sqrt(D_));     bv = rand_vec(D_, 0.1);
    wo = rand_vec(D_ * D_, 1.0 / $sqrt(D_));     bo = rand_vec(D_, 0.1);
    wf1 = rand_vec(DFF_ * D_, 1.0 / $sqrt(D_));  bf1 = rand_vec(DFF_, 0.1);
    wf2 = rand_vec(D_ * DFF_, 1.0 / $sqrt(DFF_)); bf2 = rand_vec(D_, 0.1);
    wd1 = rand_vec(DDEC_ * D_, 1.0 / $sqrt(D_)); bd1 = rand_vec(DDEC_, 0.1);
    wd2 = rand_vec(F_ * DDEC_, 1.0 / $sqrt(DDEC_)); bd2 = rand_vec(F_, 0.1);
    g1 = rand_vec(D_, 0.2, 1.0); be1 = rand_vec(D_, 0.1);
    g2 = rand_vec(D_, 0.2, 1.0); be2 = rand_vec(D_, 0.1);
    g3 = rand_vec(D_, 0.2, 1.0); be3 = rand_vec(D_, 0.1);
    pe = new[NT_ * D_];
    for (int t = 0; t < NT_; t++)
      for (int d = 0; d < D_; d++) begin
        real ang;
        ang = real'(t) / $pow(10000.0, real'(2 * (d / 2)) / real'(D_));
        pe[t * D_ + d] = q2r(r2q((d % 2 == 0) ? $sin(ang) : $cos(ang)));
      end
    // sequences: 0, 2, 3, 5 normal; 1, 4 attack-like
    for (int s = 0; s < NSEQ; s++) begin
      real amp;
      amp = (s == 1 || s == 4) ? 6.0 : 0.5;
      xin[s] = rand_vec(WORDS, amp);
      yexp[s] = model(xin[s]);
      mse[s] = 0.0;
      for (int i = 0; i < WORDS; i++) mse[s] += (yexp[s][i] - xin[s][i]) ** 2;
      mse[s] /= WORDS;
    end
    begin
      real lo, hi;
      lo = 1e9; hi = 0.0;
      for (int s = 0; s < NSEQ; s++) begin
        if ((s == 1 || s == 4) && mse[s] < lo) lo = mse[s];
        if (!(s == 1 || s == 4) && mse[s] > hi) hi = mse[s];
      end
      thr = q2r(r2q((lo + hi) / 2.0));
      $display("normal max mse %f, attack min mse %f, threshold %f", hi, lo, thr);
    end

    repeat (3) @(posedge clk); rst_n <= 1;
    @(posedge clk);
    load_linear(L_EMBED, F_, D_, w_emb, b_emb);
    for (int i = 0; i < NT_ * D_; i++) wr(L_POSENC, i, pe[i]);
    load_linear(L_Q, D_, D_, wq, bq);
    load_linear(L_K, D_, D_, wk, bk);
    load_linear(L_V, D_, D_, wv, bv);
    load_linear(L_OPROJ, D_, D_, wo, bo);
    load_ln(L_LN1, g1, be1);
    load_linear(L_FF1, D_, DFF_, wf1, bf1);
    load_linear(L_FF2, DFF_, D_, wf2, bf2);
    load_ln(L_LN2, g2, be2);
    load_ln(L_LN3, g3, be3);
    load_linear(L_DEC1, D_, DDEC_, wd1, bd1);
    load_linear(L_DEC2, DDEC_, F_, wd2, bd2);
    wr(L_SCORE, 0, thr);
    w_we <= 0;
    @(posedge clk);

    fork
      begin
        run = 1;
        wait (n_got == NSEQ * WORDS && n_scores == NSEQ);
      end
      begin
        puf_round(32'h0000_0001);
        puf_round(32'h0000_0002);
        puf_round(32'h0000_0001);
      end
      begin
        // power waster: idle first, then enabled
        logic c0;
        repeat (20) @(posedge clk);
        c0 = waste_out;
        for (int i = 0; i < 50; i++) begin
          @(posedge clk);
          checks++;
          if (waste_out != c0) begin failures++; $display("waster toggled while disabled"); end
        end
        waste_en <= 1;
        for (int i = 0; i < 200; i++) begin
          logic p;
          p = waste_out;
          @(posedge clk);
          if (waste_out != p) n_waste++;
        end
        waste_en <= 0;
      end
    join
    repeat (10) @(posedge clk);

    for (int s = 0; s < NSEQ; s++)
      $display("sequence %0d: mse %f, %0d cycles from first input to decision", s, mse[s], t_score[s] - t_first_in[s]);
    $display("mechanisms: in_stall=%0d out_bp=%0d kload=%0d vload=%0d qwait=%0d softmax=%0d ln3=%0d res=%0d anomaly=%0d normal=%0d puf_fixed=%0d waste=%0d",
             n_in_stall, n_out_bp, n_kload, n_vload, n_qwait, n_smax, n_ln, n_res, n_anom, n_norm, n_puf_fix, n_waste);
    checks++; if (n_in_stall == 0) begin failures++; $display("no input stall"); end
    checks++; if (n_out_bp == 0) begin failures++; $display("no output back-pressure"); end
    checks++; if (n_kload != NSEQ) begin failures++; $display("key loads %0d", n_kload); end
    checks++; if (n_vload != NSEQ) begin failures++; $display("value loads %0d", n_vload); end
    checks++; if (n_qwait == 0) begin failures++; $display("queries never waited"); end
    checks++; if (n_smax != NSEQ * NT_ * NT_) begin failures++; $display("softmax words %0d", n_smax); end
    checks++; if (n_ln != NSEQ * NT_ * D_) begin failures++; $display("ln3 words %0d", n_ln); end
    checks++; if (n_res != NSEQ * NT_ * D_) begin failures++; $display("residual words %0d", n_res); end
    checks++; if (n_anom == 0) begin failures++; $display("no anomaly flagged"); end
    checks++; if (n_norm == 0) begin failures++; $display("no normal sequence"); end
    checks++; if (n_puf_fix == 0) begin failures++; $display("voting never corrected a bit"); end
    checks++; if (n_waste == 0) begin failures++; $display("waster never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
