// puf_majority -- majority-vote post-processing of PUF responses.
//
// The PUF itself (glitch races in addressable shift registers and carry
// chains of the FPGA fabric) is a physical circuit outside this module; it
// is reached through a request/acknowledge port: puf_req is raised with a
// challenge on puf_challenge and held until puf_ack, which comes with one
// RESP_W-bit raw response on puf_resp.  Because a few cells of a raw
// response are noisy, the module asks the PUF the same challenge VOTES
// times and, for every bit position, counts the ones; the final bit is one
// when more than half of the VOTES responses had a one there.
//
// Operation: a start pulse (while busy is low) latches the challenge and
// clears the per-bit counters; VOTES request/acknowledge rounds follow, with
// puf_req low for one cycle between rounds; then resp_valid pulses for one
// cycle and response holds the voted result until the next start.  The
// repeated challenge, the per-bit majority and the 256-bit key width follow
// the document; the number of votes (odd, so no ties), the challenge width
// and the handshake are this design's choices.
module puf_majority #(
  parameter int unsigned RESP_W = 256,
  parameter int unsigned CHAL_W = 32,
  parameter int unsigned VOTES  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CHAL_W-1:0] challenge,
  output logic              busy,
  output logic              resp_valid,
  output logic [RESP_W-1:0] response,
  // raw PUF port
  output logic              puf_req,
  output logic [CHAL_W-1:0] puf_challenge,
  input  logic              puf_ack,
  input  logic [RESP_W-1:0] puf_resp
);
  localparam int unsigned CW = $clog2(VOTES + 1);

  logic [CW-1:0] ones [RESP_W];
  logic [CW-1:0] round;

  always_comb begin
    for (int b = 0; b < RESP_W; b++)
      response[b] = (32'(ones[b]) > VOTES / 2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      resp_valid    <= 1'b0;
      puf_req       <= 1'b0;
      puf_challenge <= '0;
      round         <= '0;
      for (int b = 0; b < RESP_W; b++) ones[b] <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy          <= 1'b1;
          puf_req       <= 1'b1;
          puf_challenge <= challenge;
          round         <= '0;
          for (int b = 0; b < RESP_W; b++) ones[b] <= '0;
        end
      end else if (puf_req) begin
        if (puf_ack) begin
          puf_req <= 1'b0;
          for (int b = 0; b < RESP_W; b++) ones[b] <= ones[b] + CW'(puf_resp[b]);
          if (round == CW'(VOTES - 1)) begin
            busy       <= 1'b0;
            resp_valid <= 1'b1;
          end
          round <= round + CW'(1);
        end
      end else begin
        puf_req <= 1'b1;     // next round after one idle cycle
      end
    end
  end

  // The PUF only answers an outstanding request.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!puf_ack || puf_req) else $error("puf_ack without puf_req");
  end
endmodule
