// stream_fork -- broadcasts one valid/ready word stream to N consumers.
//
// A word is passed on only when every consumer is ready, so all consumers
// see the same sequence and none of them runs ahead.  Used where a dataflow
// branch splits: the queries/keys/values inputs of self-attention and the
// residual (skip) paths.  Purely combinational: every out_data is a copy
// of in_data (wires only), and out_valid is raised only while all consumers
// are ready, so a consumer's ready must not depend on its valid input in
// the same cycle (none in this design does).  The document shows the
// branches; the all-ready rule is this design's choice.
module stream_fork
  import attae_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  q_t           in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output q_t   [N-1:0] out_data,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready
);
  assign in_ready = &out_ready;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      out_data[i]  = in_data;
      out_valid[i] = in_valid && in_ready;
    end
  end
endmodule
