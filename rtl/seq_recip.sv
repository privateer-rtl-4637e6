// seq_recip -- sequential fixed-point reciprocal, one quotient bit per clock.
//
// Computes q = floor(2^NUM_SH / den) for an unsigned DEN_W-bit divisor by
// restoring division: the remainder is shifted left once per cycle, the
// numerator's single set bit is shifted in at the top, and the divisor is
// subtracted whenever it fits.  With NUM_SH = 48 and a Q8.24 divisor the
// quotient is the reciprocal in Q.24.  A pulse on start loads the divisor;
// done pulses NUM_SH+1 cycles later with the quotient valid until the next
// start.  A zero divisor gives an all-ones quotient.  Used by the softmax
// (1 / sum of exponentials) and LayerNorm (1 / standard deviation) stages;
// the document does not say how these divisions are made, this radix-2
// divider is this design's choice.
module seq_recip #(
  parameter int unsigned DEN_W  = 32,
  parameter int unsigned NUM_SH = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [DEN_W-1:0]   den,
  output logic               busy,
  output logic               done,
  output logic [NUM_SH:0]    quot
);
  localparam int unsigned CW = $clog2(NUM_SH + 2);

  logic [DEN_W-1:0] rem;   // always below den_q
  logic [DEN_W-1:0] den_q;
  logic [CW-1:0]    bit_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      rem     <= '0;
      den_q   <= '0;
      quot    <= '0;
      bit_idx <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        rem     <= '0;
        den_q   <= den;
        quot    <= '0;
        bit_idx <= CW'(NUM_SH);
      end else if (busy) begin
        logic [DEN_W:0] r;
        // numerator = 2^NUM_SH: only its top bit is one
        r = {rem, (bit_idx == CW'(NUM_SH))};
        if (r >= {1'b0, den_q}) begin
          rem <= DEN_W'(r - {1'b0, den_q});
          quot[bit_idx] <= 1'b1;
        end else begin
          rem <= r[DEN_W-1:0];
        end
        if (bit_idx == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bit_idx <= bit_idx - CW'(1);
        end
      end
    end
  end
endmodule
