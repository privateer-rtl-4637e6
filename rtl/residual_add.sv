// residual_add -- adds a skip-path stream to a layer-output stream.
//
// Joins two Q8.24 word streams element by element: a word is produced when
// both inputs hold one, and it is their saturating sum.  The sum is held in a
// one-word output register (one word per clock, one cycle of latency).  The
// encoder uses two of these, after self-attention and after the feed-forward
// block; the skip path reaches it through a FIFO deep enough to cover the
// latency of the branch.  Saturation on overflow is this design's choice.
module residual_add
  import attae_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q_t   a_data,
  input  logic a_valid,
  output logic a_ready,
  input  q_t   b_data,
  input  logic b_valid,
  output logic b_ready,
  output q_t   out_data,
  output logic out_valid,
  input  logic out_ready
);
  logic fire, space;
  assign space   = !out_valid || out_ready;
  assign fire    = a_valid && b_valid && space;
  assign a_ready = b_valid && space;
  assign b_ready = a_valid && space;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (space) begin
      out_valid <= fire;
      if (fire) out_data <= qadd(a_data, b_data);
    end
  end
endmodule
