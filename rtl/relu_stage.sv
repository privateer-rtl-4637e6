// relu_stage -- rectified-linear activation on a Q8.24 word stream.
//
// Passes each word through unchanged when it is positive and replaces it by
// zero otherwise.  The result is registered in a one-word skid-free output
// register: a word is accepted whenever the register is empty or is being
// emptied in the same cycle, so the stage sustains one word per clock with a
// latency of one cycle.  The document places a ReLU between the two Linear
// layers of the feed-forward block and of the decoder; the one-cycle
// registered stage is this design's choice.
module relu_stage
  import attae_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  q_t   in_data,
  input  logic in_valid,
  output logic in_ready,
  output q_t   out_data,
  output logic out_valid,
  input  logic out_ready
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data[DATA_W-1] ? '0 : in_data;
    end
  end
endmodule
