// privateer_top -- secure edge accelerator: anomaly detection plus security
// support logic on one FPGA.
//
// Three parts sit side by side and share only the clock and reset:
//   * attae_accel: the attention-autoencoder pipeline, which reconstructs
//     each 12 x 8 sequence of network-monitoring features and flags
//     sequences whose reconstruction error is above a threshold (DDoS
//     detection);
//   * puf_majority: majority voting over repeated responses of the on-chip
//     physical unclonable function, giving a stable 256-bit device key or
//     attestation response; the PUF cells are physical race circuits and are
//     reached through the puf_* ports;
//   * power_waster: a random toggle bank that masks the power signature of
//     cryptographic user kernels while waste_en is high.
// Remote attestation is a protocol run by an external server and software
// on the processing system; the attestation response is taken from
// puf_response.  All ports are plain signals; the timing of each part is
// described in its own module.  The grouping follows the document's overview
// of the edge node; the port list is this design's choice.
module privateer_top
  import attae_pkg::*;
#(
  parameter int unsigned AW        = 16,
  parameter int unsigned PUF_W     = 256,
  parameter int unsigned CHAL_W    = 32,
  parameter int unsigned PUF_VOTES = 5,
  parameter int unsigned WASTE_N   = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // anomaly-detection accelerator
  input  q_t                feat_data,
  input  logic              feat_valid,
  output logic              feat_ready,
  output q_t                recon_data,
  output logic              recon_valid,
  input  logic              recon_ready,
  output q_t                score,
  output logic              score_valid,
  output logic              anomaly,
  input  logic              w_we,
  input  logic [4:0]        w_layer,
  input  logic [AW-1:0]     w_addr,
  input  q_t                w_data,
  // PUF key generation
  input  logic              puf_start,
  input  logic [CHAL_W-1:0] puf_chal_in,
  output logic              puf_busy,
  output logic              puf_resp_valid,
  output logic [PUF_W-1:0]  puf_response,
  output logic              puf_req,
  output logic [CHAL_W-1:0] puf_challenge,
  input  logic              puf_ack,
  input  logic [PUF_W-1:0]  puf_raw,
  // power obfuscation
  input  logic              waste_en,
  output logic              waste_out
);
  attae_accel #(.AW(AW)) u_accel (
    .clk, .rst_n,
    .in_data(feat_data), .in_valid(feat_valid), .in_ready(feat_ready),
    .out_data(recon_data), .out_valid(recon_valid), .out_ready(recon_ready),
    .score, .score_valid, .anomaly,
    .w_we, .w_layer, .w_addr, .w_data);

  puf_majority #(.RESP_W(PUF_W), .CHAL_W(CHAL_W), .VOTES(PUF_VOTES)) u_puf_vote (
    .clk, .rst_n, .start(puf_start), .challenge(puf_chal_in), .busy(puf_busy),
    .resp_valid(puf_resp_valid), .response(puf_response),
    .puf_req, .puf_challenge, .puf_ack, .puf_resp(puf_raw));

  power_waster #(.CELLS(WASTE_N)) u_waster (
    .clk, .rst_n, .enable(waste_en), .cells(), .waste_out);
endmodule
