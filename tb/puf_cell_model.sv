// puf_cell_model -- behavioural model of a glitch-race PUF, for testbenches.
//
// Not synthesizable and not part of the design: it stands in for the array
// of physical PUF cells, whose value depends on manufacturing delay
// variation.  Each cell has a fixed preference per challenge, derived from a
// hash of the device seed, the challenge and the bit position: most cells are
// stable (they return their preferred value with probability 0.98), one in
// eight is unstable (probability 0.7).  A request (req high) is answered
// LAT clock cycles later with ack high for one cycle and a fresh, noisy raw
// response; every response given is also kept in `history` for checking.
module puf_cell_model #(
  parameter int unsigned RESP_W = 256,
  parameter int unsigned CHAL_W = 32,
  parameter int unsigned LAT    = 6,
  parameter int unsigned DEVICE = 32'h5EED_0001
) (
  input  logic              clk,
  input  logic              req,
  input  logic [CHAL_W-1:0] challenge,
  output logic              ack,
  output logic [RESP_W-1:0] resp
);
  logic [RESP_W-1:0] history [$];
  int unsigned noisy_bits = 0;   // raw bits that differed from the cell's preference

  function automatic int unsigned mix(input int unsigned a, input int unsigned b, input int unsigned c);
    int unsigned h;
    h = a ^ (b * 32'h9E37_79B9) ^ (c * 32'h85EB_CA6B);
    h = h ^ (h >> 15); h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12); h = h * 32'h297A_2D39;
    return h ^ (h >> 15);
  endfunction

  function automatic bit preferred(input logic [CHAL_W-1:0] ch, input int b);
    return mix(DEVICE, 32'(ch), b)[0];
  endfunction

  function automatic bit unstable(input logic [CHAL_W-1:0] ch, input int b);
    return mix(DEVICE + 1, 32'(ch), b)[7:5] == 3'd0;
  endfunction

  initial begin
    ack  = 1'b0;
    resp = '0;
    repeat (4) @(posedge clk);   // let the requester come out of reset
    forever begin
      @(posedge clk);
      if (req && !ack) begin
        logic [RESP_W-1:0] r;
        repeat (LAT - 1) @(posedge clk);
        for (int b = 0; b < RESP_W; b++) begin
          int unsigned keep;
          keep = unstable(challenge, b) ? 700 : 980;
          r[b] = (($urandom % 1000) < keep) ? preferred(challenge, b) : !preferred(challenge, b);
          if (r[b] != preferred(challenge, b)) noisy_bits++;
        end
        history.push_back(r);
        ack  <= 1'b1;
        resp <= r;
        @(posedge clk);
        ack  <= 1'b0;
      end
    end
  end
endmodule
