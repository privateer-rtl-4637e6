// transformer_encoder -- one transformer encoder layer on a word stream.
//
// Order of operations (as drawn for this design):
//   h = LayerNorm1(x + SelfAttention(x))
//   y = h + LayerNorm2(Linear2(ReLU(Linear1(h))))
// The input is broadcast to self-attention and to a skip FIFO; the first
// residual adder joins them.  The normalised result is broadcast again to
// the feed-forward branch and to a second skip FIFO, and the second adder
// joins the branch output with it.  The first skip FIFO must hold a whole
// sequence (attention only produces output after the last key has arrived);
// the second holds two vectors, enough to cover the feed-forward branch,
// which never holds more than one vector of its input at a time.  All
// stages run concurrently and exchange one Q8.24 word per handshake.
// Parameters of the self-attention, LayerNorm and feed-forward layers are
// written through the shared write port (w_layer = L_Q .. L_LN2).  The
// layer order follows the document; the feed-forward width D_FF and the
// FIFO depths are this design's choices.
module transformer_encoder
  import attae_pkg::*;
#(
  parameter int unsigned NT   = NTS,
  parameter int unsigned D    = D_MODEL,
  parameter int unsigned DFF  = D_FF,
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
  // ---- attention sub-block ----
  q_t   [1:0] f1_d;
  logic [1:0] f1_v, f1_r;
  stream_fork #(.N(2)) u_fork1 (
    .in_data, .in_valid, .in_ready,
    .out_data(f1_d), .out_valid(f1_v), .out_ready(f1_r));

  q_t   at_d, r1_d;
  logic at_v, at_r, r1_v, r1_r;
  self_attention #(.NT(NT), .D(D), .AW(AW)) u_attn (
    .clk, .rst_n, .in_data(f1_d[0]), .in_valid(f1_v[0]), .in_ready(f1_r[0]),
    .out_data(at_d), .out_valid(at_v), .out_ready(at_r),
    .w_we, .w_layer, .w_addr, .w_data);

  stream_fifo #(.WIDTH(DATA_W), .DEPTH(NT * D + 2 * D)) u_skip1 (
    .clk, .rst_n, .in_data(f1_d[1]), .in_valid(f1_v[1]), .in_ready(f1_r[1]),
    .out_data(r1_d), .out_valid(r1_v), .out_ready(r1_r), .count());

  q_t   s1_d;
  logic s1_v, s1_r;
  residual_add u_add1 (
    .clk, .rst_n, .a_data(at_d), .a_valid(at_v), .a_ready(at_r),
    .b_data(r1_d), .b_valid(r1_v), .b_ready(r1_r),
    .out_data(s1_d), .out_valid(s1_v), .out_ready(s1_r));

  q_t   h_d;
  logic h_v, h_r;
  layer_norm #(.D(D), .WA_W(AW)) u_ln1 (
    .clk, .rst_n, .in_data(s1_d), .in_valid(s1_v), .in_ready(s1_r),
    .out_data(h_d), .out_valid(h_v), .out_ready(h_r),
    .w_we(w_we && w_layer == L_LN1), .w_addr, .w_data);

  // ---- feed-forward sub-block ----
  q_t   [1:0] f2_d;
  logic [1:0] f2_v, f2_r;
  stream_fork #(.N(2)) u_fork2 (
    .in_data(h_d), .in_valid(h_v), .in_ready(h_r),
    .out_data(f2_d), .out_valid(f2_v), .out_ready(f2_r));

  q_t   l1_d, rl_d, l2_d, n2_d, r2_d;
  logic l1_v, l1_r, rl_v, rl_r, l2_v, l2_r, n2_v, n2_r, r2_v, r2_r;
  linear_layer #(.F_IN(D), .F_OUT(DFF), .WA_W(AW)) u_ff1 (
    .clk, .rst_n, .in_data(f2_d[0]), .in_valid(f2_v[0]), .in_ready(f2_r[0]),
    .out_data(l1_d), .out_valid(l1_v), .out_ready(l1_r),
    .w_we(w_we && w_layer == L_FF1), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());
  relu_stage u_relu (
    .clk, .rst_n, .in_data(l1_d), .in_valid(l1_v), .in_ready(l1_r),
    .out_data(rl_d), .out_valid(rl_v), .out_ready(rl_r));
  linear_layer #(.F_IN(DFF), .F_OUT(D), .WA_W(AW)) u_ff2 (
    .clk, .rst_n, .in_data(rl_d), .in_valid(rl_v), .in_ready(rl_r),
    .out_data(l2_d), .out_valid(l2_v), .out_ready(l2_r),
    .w_we(w_we && w_layer == L_FF2), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());
  layer_norm #(.D(D), .WA_W(AW)) u_ln2 (
    .clk, .rst_n, .in_data(l2_d), .in_valid(l2_v), .in_ready(l2_r),
    .out_data(n2_d), .out_valid(n2_v), .out_ready(n2_r),
    .w_we(w_we && w_layer == L_LN2), .w_addr, .w_data);

  stream_fifo #(.WIDTH(DATA_W), .DEPTH(2 * D)) u_skip2 (
    .clk, .rst_n, .in_data(f2_d[1]), .in_valid(f2_v[1]), .in_ready(f2_r[1]),
    .out_data(r2_d), .out_valid(r2_v), .out_ready(r2_r), .count());

  residual_add u_add2 (
    .clk, .rst_n, .a_data(n2_d), .a_valid(n2_v), .a_ready(n2_r),
    .b_data(r2_d), .b_valid(r2_v), .b_ready(r2_r),
    .out_data, .out_valid, .out_ready);
endmodule
