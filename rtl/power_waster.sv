// power_waster -- switching-noise generator against power side-channel attacks.
//
// An attacker who records the power drawn by the FPGA (for instance through
// on-board sensors) and correlates it with a cipher's intermediate values can
// recover its key.  This block adds power consumption that does not depend on
// any secret: a bank of CELLS flip-flops, each of which inverts itself in a
// clock cycle when a pair of bits of a free-running 64-bit pseudo-random
// sequence reads 1 and 0.  About a quarter of the cells switch in every
// cycle, a different random set each time, so the extra current varies
// randomly from cycle to cycle and hides the data-dependent part of the
// victim's consumption.
//
// The sequence generator is a Galois LFSR with taps 64, 63, 61, 60 (maximal
// length), loaded with SEED at reset; cell i toggles when LFSR bit i mod 64
// is 1 and bit (i + 1 + i div 64) mod 64 is 0 (pairs that differ between
// the 64-cell groups, so the parity output does not cancel).  With
// enable low nothing toggles and the LFSR holds.  waste_out is the parity of
// all cells, so that synthesis keeps them.  The document states only that
// power-wasting circuits obfuscate the collected power samples; the LFSR-
// driven toggle bank and its size are this design's choices.
module power_waster #(
  parameter int unsigned   CELLS = 256,
  parameter logic [63:0]   SEED  = 64'hACE1_2468_1357_BDF9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic [CELLS-1:0] cells,
  output logic             waste_out
);
  logic [63:0] lfsr;
  logic [CELLS-1:0] toggle;

  always_comb begin
    for (int i = 0; i < CELLS; i++)
      toggle[i] = lfsr[i % 64] & ~lfsr[(i + 1 + i / 64) % 64];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr  <= (SEED == '0) ? 64'h1 : SEED;
      cells <= '0;
    end else if (enable) begin
      lfsr  <= {1'b0, lfsr[63:1]} ^ (lfsr[0] ? 64'hD800_0000_0000_0000 : 64'h0);
      cells <= cells ^ toggle;
    end
  end

  assign waste_out = ^cells;
endmodule
