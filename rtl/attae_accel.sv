// attae_accel -- dataflow accelerator for the attention autoencoder (Att-AE).
//
// A sequence of NT timesteps, each of F network-monitoring features, enters
// as a stream of NT*F Q8.24 words (timestep-major).  The pipeline is
//   Linear(F->D) embedding -> positional encoding -> transformer encoder
//   -> LayerNorm -> Linear(D->D_DEC) -> ReLU -> Linear(D_DEC->F)
// and the reconstruction leaves as a stream of NT*F words.  A copy of the
// input waits in a FIFO so that the scorer can compare it with the
// reconstruction and flag the sequence as anomalous when the mean squared
// error exceeds a threshold.  Every stage is a separate module running
// concurrently and passing one word per valid/ready handshake; Linear layers
// use one processing element per output feature.
//
// Weights, biases, the positional-encoding table, the LayerNorm
// gamma/beta and the threshold are written through one port before use:
// w_layer selects the layer (see attae_pkg::layer_id_e) and w_addr is the
// address inside it (Linear: y*F_IN + x for w[y][x], F_OUT*F_IN + y for the
// bias; LayerNorm: d for gamma, D + d for beta; positional encoding:
// t*D + d; scorer: 0).
//
// The layer sequence, the Q8.24 number format and the 12 x 8 input with a
// 32-wide embedding follow the document; the hidden widths D_FF and D_DEC,
// the load port and the scoring rule are this design's choices.
module attae_accel
  import attae_pkg::*;
#(
  parameter int unsigned NT   = NTS,
  parameter int unsigned F    = N_FEAT,
  parameter int unsigned D    = D_MODEL,
  parameter int unsigned DFF  = D_FF,
  parameter int unsigned DDEC = D_DEC,
  parameter int unsigned AW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // input features
  input  q_t            in_data,
  input  logic          in_valid,
  output logic          in_ready,
  // reconstruction
  output q_t            out_data,
  output logic          out_valid,
  input  logic          out_ready,
  // anomaly decision, once per sequence
  output q_t            score,
  output logic          score_valid,
  output logic          anomaly,
  // parameter load port
  input  logic          w_we,
  input  logic [4:0]    w_layer,
  input  logic [AW-1:0] w_addr,
  input  q_t            w_data
);
  layer_id_e lid;
  assign lid = layer_id_e'(w_layer);

  q_t   [1:0] f_d;
  logic [1:0] f_v, f_r;
  stream_fork #(.N(2)) u_fork (
    .in_data, .in_valid, .in_ready,
    .out_data(f_d), .out_valid(f_v), .out_ready(f_r));

  // Original input, kept for the reconstruction error.
  q_t   x_d;
  logic x_v, x_r;
  stream_fifo #(.WIDTH(DATA_W), .DEPTH(2 * NT * F)) u_xfifo (
    .clk, .rst_n, .in_data(f_d[1]), .in_valid(f_v[1]), .in_ready(f_r[1]),
    .out_data(x_d), .out_valid(x_v), .out_ready(x_r), .count());

  q_t   e_d, p_d, t_d, n_d, d1_d, rl_d, y_d;
  logic e_v, e_r, p_v, p_r, t_v, t_r, n_v, n_r, d1_v, d1_r, rl_v, rl_r, y_v, y_r;

  linear_layer #(.F_IN(F), .F_OUT(D), .WA_W(AW)) u_embed (
    .clk, .rst_n, .in_data(f_d[0]), .in_valid(f_v[0]), .in_ready(f_r[0]),
    .out_data(e_d), .out_valid(e_v), .out_ready(e_r),
    .w_we(w_we && lid == L_EMBED), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());

  pos_encoding #(.NT(NT), .D(D), .WA_W(AW)) u_pos (
    .clk, .rst_n, .in_data(e_d), .in_valid(e_v), .in_ready(e_r),
    .out_data(p_d), .out_valid(p_v), .out_ready(p_r),
    .w_we(w_we && lid == L_POSENC), .w_addr, .w_data);

  transformer_encoder #(.NT(NT), .D(D), .DFF(DFF), .AW(AW)) u_enc (
    .clk, .rst_n, .in_data(p_d), .in_valid(p_v), .in_ready(p_r),
    .out_data(t_d), .out_valid(t_v), .out_ready(t_r),
    .w_we, .w_layer(lid), .w_addr, .w_data);

  layer_norm #(.D(D), .WA_W(AW)) u_ln3 (
    .clk, .rst_n, .in_data(t_d), .in_valid(t_v), .in_ready(t_r),
    .out_data(n_d), .out_valid(n_v), .out_ready(n_r),
    .w_we(w_we && lid == L_LN3), .w_addr, .w_data);

  linear_layer #(.F_IN(D), .F_OUT(DDEC), .WA_W(AW)) u_dec1 (
    .clk, .rst_n, .in_data(n_d), .in_valid(n_v), .in_ready(n_r),
    .out_data(d1_d), .out_valid(d1_v), .out_ready(d1_r),
    .w_we(w_we && lid == L_DEC1), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());

  relu_stage u_relu (
    .clk, .rst_n, .in_data(d1_d), .in_valid(d1_v), .in_ready(d1_r),
    .out_data(rl_d), .out_valid(rl_v), .out_ready(rl_r));

  linear_layer #(.F_IN(DDEC), .F_OUT(F), .WA_W(AW)) u_dec2 (
    .clk, .rst_n, .in_data(rl_d), .in_valid(rl_v), .in_ready(rl_r),
    .out_data(y_d), .out_valid(y_v), .out_ready(y_r),
    .w_we(w_we && lid == L_DEC2), .w_addr, .w_data, .wgt_ok(1'b1), .vec_done());

  recon_scorer #(.NT(NT), .F(F)) u_score (
    .clk, .rst_n, .x_data(x_d), .x_valid(x_v), .x_ready(x_r),
    .y_data(y_d), .y_valid(y_v), .y_ready(y_r),
    .out_data, .out_valid, .out_ready,
    .thr_we(w_we && lid == L_SCORE && w_addr == '0), .thr_data(w_data),
    .score, .score_valid, .anomaly);
endmodule
