// attae_ref_pkg -- floating-point reference model of the Att-AE layers, for
// testbenches.  Matrices are flattened row-major into dynamic arrays of
// reals (element [r][c] of an R x C matrix is m[r*C + c]).  Weights of a
// Linear layer with fin inputs and fout outputs are w[y*fin + x], exactly as
// they are written into the hardware.  The attention scores are not scaled:
// the hardware expects 1/sqrt(D) to be folded into the query weights.
package attae_ref_pkg;
  typedef real vec_t[];

  function automatic real q2r(input int q);
    return real'(q) / 16777216.0;
  endfunction

  function automatic int r2q(input real r);
    real s;
    s = r * 16777216.0;
    if (s > 2147483647.0) return 32'h7fffffff;
    if (s < -2147483648.0) return 32'h80000000;
    return $rtoi(s);
  endfunction

  // y[t][o] = b[o] + sum_i x[t][i] w[o][i]
  function automatic vec_t linear(input vec_t x, input int nt, input int fin, input int fout,
                                  input vec_t w, input vec_t b);
    vec_t y = new[nt * fout];
    for (int t = 0; t < nt; t++)
      for (int o = 0; o < fout; o++) begin
        real s = b[o];
        for (int i = 0; i < fin; i++) s += x[t * fin + i] * w[o * fin + i];
        y[t * fout + o] = s;
      end
    return y;
  endfunction

  function automatic vec_t relu(input vec_t x);
    vec_t y = new[x.size()];
    foreach (x[i]) y[i] = (x[i] > 0.0) ? x[i] : 0.0;
    return y;
  endfunction

  function automatic vec_t add(input vec_t a, input vec_t b);
    vec_t y = new[a.size()];
    foreach (a[i]) y[i] = a[i] + b[i];
    return y;
  endfunction

  function automatic vec_t layer_norm(input vec_t x, input int nt, input int d,
                                      input vec_t g, input vec_t be);
    vec_t y = new[nt * d];
    for (int t = 0; t < nt; t++) begin
      real m = 0.0, v = 0.0;
      for (int i = 0; i < d; i++) m += x[t * d + i];
      m /= d;
      for (int i = 0; i < d; i++) v += (x[t * d + i] - m) ** 2;
      v /= d;
      for (int i = 0; i < d; i++) y[t * d + i] = g[i] * (x[t * d + i] - m) / $sqrt(v + 1e-5) + be[i];
    end
    return y;
  endfunction

  // Single-head attention; q, k, v are nt x d.
  function automatic vec_t attention(input vec_t q, input vec_t k, input vec_t v,
                                     input int nt, input int d);
    vec_t y = new[nt * d];
    for (int t = 0; t < nt; t++) begin
      real s [];
      real m, tot;
      s = new[nt];
      for (int j = 0; j < nt; j++) begin
        s[j] = 0.0;
        for (int i = 0; i < d; i++) s[j] += q[t * d + i] * k[j * d + i];
      end
      m = s[0];
      for (int j = 1; j < nt; j++) if (s[j] > m) m = s[j];
      tot = 0.0;
      for (int j = 0; j < nt; j++) begin s[j] = $exp(s[j] - m); tot += s[j]; end
      for (int i = 0; i < d; i++) begin
        real a = 0.0;
        for (int j = 0; j < nt; j++) a += s[j] / tot * v[j * d + i];
        y[t * d + i] = a;
      end
    end
    return y;
  endfunction
endpackage
