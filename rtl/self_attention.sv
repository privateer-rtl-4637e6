// self_attention -- single-head self-attention built only from Linear layers.
//
// For a sequence X of NT timesteps of D words it computes
//   Q = X Wq + bq,  K = X Wk + bk,  V = X Wv + bv,
//   S = Q K^T,  P = softmax_rows(S),  A = P V,  Y = A Wo + bo.
// The input stream is broadcast to the query, key and value Linear layers.
// The key and value rows are not streamed on: weight loaders write them into
// the weight memories of two further Linear layers, so that the score layer
// (D inputs, NT outputs, weights K) computes a row of S for each query row,
// and after the row-wise softmax the output layer (NT inputs, D outputs,
// weights V^T) computes a row of A; a last Linear layer is the output
// projection.  Because the score layer needs every key of the sequence, the
// query rows wait in a FIFO of NT*D words until the keys are in place.
// Learned weights and biases arrive on a shared write port: w_layer selects
// L_Q, L_K, L_V or L_OPROJ and w_addr is the layer-local address of
// linear_layer.  The mapping of attention onto Linear layers and the
// "load weights" step follow the document; a single head, the FIFO depths
// and the scaling of the scores by 1/sqrt(D) being folded into Wq and bq are
// this design's choices.
module self_attention
  import attae_pkg::*;
#(
  parameter int unsigned NT   = NTS,
  parameter int unsigned D    = D_MODEL,
  parameter int unsigned AW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  q_t            in_data,
  input  logic          in_valid,
  output logic          in_ready,
  output q_t            out_data,
  output logic          out_valid,
  input  logic          out_ready,
  input  logic          w_we,
  input  layer_id_e     w_layer,
  input  logic [AW-1:0] w_addr,
  input  q_t            w_data
);
  // Broadcast to Q, K, V.
  q_t   [2:0] f_data;
  logic [2:0] f_valid, f_ready;
  stream_fork #(.N(3)) u_fork (
    .in_data, .in_valid, .in_ready,
    .out_data(f_data), .out_valid(f_valid), .out_ready(f_ready));

  // Query, key and value projections.
  q_t   q_d, k_d, v_d;
  logic q_v, q_r, k_v, k_r, v_v, v_r;
  linear_layer #(.F_IN(D), .F_OUT(D), .WA_W(AW)) u_q (
    .clk, .rst_n, .in_data(f_data[0]), .in_valid(f_valid[0]), .in_ready(f_ready[0]),
    .out_data(q_d), .out_valid(q_v), .out_ready(q_r),
    .w_we(w_we && w_layer == L_Q), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());
  linear_layer #(.F_IN(D), .F_OUT(D), .WA_W(AW)) u_k (
    .clk, .rst_n, .in_data(f_data[1]), .in_valid(f_valid[1]), .in_ready(f_ready[1]),
    .out_data(k_d), .out_valid(k_v), .out_ready(k_r),
    .w_we(w_we && w_layer == L_K), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());
  linear_layer #(.F_IN(D), .F_OUT(D), .WA_W(AW)) u_v (
    .clk, .rst_n, .in_data(f_data[2]), .in_valid(f_valid[2]), .in_ready(f_ready[2]),
    .out_data(v_d), .out_valid(v_v), .out_ready(v_r),
    .w_we(w_we && w_layer == L_V), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());

  // Query rows wait here until all keys of the sequence are loaded.
  q_t   qf_d;
  logic qf_v, qf_r;
  stream_fifo #(.WIDTH(DATA_W), .DEPTH(NT * D)) u_qfifo (
    .clk, .rst_n, .in_data(q_d), .in_valid(q_v), .in_ready(q_r),
    .out_data(qf_d), .out_valid(qf_v), .out_ready(qf_r), .count());

  // Keys become the weights of the score layer: w[j][i] = K[j][i].
  logic          kw_we, kw_ok, s_done;
  logic [AW-1:0] kw_addr;
  q_t            kw_data;
  attn_weight_loader #(.NT(NT), .D(D), .TRANSPOSE(1'b0), .WA_W(AW)) u_kload (
    .clk, .rst_n, .in_data(k_d), .in_valid(k_v), .in_ready(k_r),
    .w_we(kw_we), .w_addr(kw_addr), .w_data(kw_data), .wgt_ok(kw_ok), .vec_done(s_done));

  // Values become the weights of the output layer: w[i][j] = V[j][i].
  logic          vw_we, vw_ok, a_done;
  logic [AW-1:0] vw_addr;
  q_t            vw_data;
  attn_weight_loader #(.NT(NT), .D(D), .TRANSPOSE(1'b1), .WA_W(AW)) u_vload (
    .clk, .rst_n, .in_data(v_d), .in_valid(v_v), .in_ready(v_r),
    .w_we(vw_we), .w_addr(vw_addr), .w_data(vw_data), .wgt_ok(vw_ok), .vec_done(a_done));

  // Scores S = Q K^T, one row of NT per query.
  q_t   s_d;
  logic s_v, s_r;
  linear_layer #(.F_IN(D), .F_OUT(NT), .WA_W(AW)) u_score (
    .clk, .rst_n, .in_data(qf_d), .in_valid(qf_v), .in_ready(qf_r),
    .out_data(s_d), .out_valid(s_v), .out_ready(s_r),
    .w_we(kw_we), .w_addr(kw_addr), .w_data(kw_data), .wgt_ok(kw_ok), .vec_done(s_done));

  // Row-wise softmax.
  q_t   p_d;
  logic p_v, p_r;
  softmax_unit #(.N(NT)) u_softmax (
    .clk, .rst_n, .in_data(s_d), .in_valid(s_v), .in_ready(s_r),
    .out_data(p_d), .out_valid(p_v), .out_ready(p_r));

  // A = P V.
  q_t   a_d;
  logic a_v, a_r;
  linear_layer #(.F_IN(NT), .F_OUT(D), .WA_W(AW)) u_pv (
    .clk, .rst_n, .in_data(p_d), .in_valid(p_v), .in_ready(p_r),
    .out_data(a_d), .out_valid(a_v), .out_ready(a_r),
    .w_we(vw_we), .w_addr(vw_addr), .w_data(vw_data), .wgt_ok(vw_ok), .vec_done(a_done));

  // Output projection.
  linear_layer #(.F_IN(D), .F_OUT(D), .WA_W(AW)) u_oproj (
    .clk, .rst_n, .in_data(a_d), .in_valid(a_v), .in_ready(a_r),
    .out_data, .out_valid, .out_ready,
    .w_we(w_we && w_layer == L_OPROJ), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());
endmodule
