// recon_scorer -- reconstruction error and anomaly decision for a sequence.
//
// The autoencoder is trained to reproduce normal traffic, so a large
// difference between a sequence and its reconstruction marks an anomaly.
// The scorer joins the original input stream x and the reconstruction
// stream y word by word (both NT*F words per sequence), passes y on
// unchanged through a one-word output register, and accumulates (y - x)^2
// at full Q.48 precision.  After the last word it divides by NT*F to get the
// mean squared error, returns it as a Q8.24 score (saturated) with a one-cycle
// score_valid pulse, and raises anomaly when the score is above the
// threshold (write port address 0; reset value 1.0).  The score and flag
// hold until the next sequence ends.  The document states the detection
// principle only; the mean squared error and the single threshold are this
// design's choices.
module recon_scorer
  import attae_pkg::*;
#(
  parameter int unsigned NT = NTS,
  parameter int unsigned F  = N_FEAT
) (
  input  logic clk,
  input  logic rst_n,
  input  q_t   x_data,
  input  logic x_valid,
  output logic x_ready,
  input  q_t   y_data,
  input  logic y_valid,
  output logic y_ready,
  output q_t   out_data,
  output logic out_valid,
  input  logic out_ready,
  input  logic thr_we,
  input  q_t   thr_data,
  output q_t   score,
  output logic score_valid,
  output logic anomaly
);
  localparam int unsigned CW = $clog2(NT * F);

  logic          fire, space;
  logic [CW-1:0] cnt;
  logic [79:0]   err;
  q_t            thr;

  assign space   = !out_valid || out_ready;
  assign fire    = x_valid && y_valid && space;
  assign x_ready = y_valid && space;
  assign y_ready = x_valid && space;

  always_ff @(posedge clk) begin
    if (!rst_n) thr <= Q_ONE;
    else if (thr_we) thr <= thr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_data    <= '0;
      cnt         <= '0;
      err         <= '0;
      score       <= '0;
      score_valid <= 1'b0;
      anomaly     <= 1'b0;
    end else begin
      score_valid <= 1'b0;
      if (space) begin
        out_valid <= fire;
        if (fire) out_data <= y_data;
      end
      if (fire) begin
        logic signed [32:0] dx;
        logic        [79:0] e;
        logic        [79:0] mse;
        dx = 33'(y_data) - 33'(x_data);
        e  = err + 80'(unsigned'(66'(dx) * 66'(dx)));
        if (cnt == CW'(NT * F - 1)) begin
          q_t s;
          mse = (e / 80'(NT * F)) >> FRAC_W;
          s   = (mse > 80'(Q_MAX)) ? Q_MAX : q_t'(mse);
          score       <= s;
          anomaly     <= (s > thr);
          score_valid <= 1'b1;
          err         <= '0;
          cnt         <= '0;
        end else begin
          err <= e;
          cnt <= cnt + CW'(1);
        end
      end
    end
  end
endmodule
