// stream_fifo -- synchronous first-in first-out buffer between dataflow stages.
//
// The accelerator is a chain of concurrently running layer modules that pass
// Q8.24 words to each other through FIFO buffers; this is that buffer.  It
// holds DEPTH words of WIDTH bits in a circular array (DEPTH need not be a
// power of two) with separate read and write pointers and an occupancy
// counter.  Both ports use a valid/ready handshake: a word moves on a rising
// clock edge where valid and ready are both high.  The output is the head of
// the array, so a written word can be read on the cycle after it was
// written.  Reset is synchronous and active low and empties the buffer.
// The handshake and the buffer follow the document; the depth of each
// instance is chosen by the enclosing design.
module stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The occupancy can never pass the depth.
  always_ff @(posedge clk) begin
    if (rst_n) assert (32'(count) <= DEPTH) else $error("stream_fifo overflow");
  end
endmodule
