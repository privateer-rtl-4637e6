// attn_weight_loader -- turns a Linear layer's output stream into the run-time
// weights of another Linear layer ("Load Weights" in self-attention).
//
// Self-attention is computed with Linear layers only: the scores Q*K^T are a
// Linear layer whose weights are the key rows K[j][*], and the weighted sum
// P*V is a Linear layer whose weights are the value columns V[*][d].  The
// key and value Linear layers stream their outputs row by row (timestep j,
// then feature i); this block counts (j, i) and writes each word into the
// consumer's weight memory at address y*F_IN + x, with
//   TRANSPOSE = 0:  y = j, x = i   (keys:   w[j][i] = K[j][i], F_IN = D)
//   TRANSPOSE = 1:  y = i, x = j   (values: w[i][j] = V[j][i], F_IN = NT)
// Once all NT*D words of a sequence are written, wgt_ok goes high and lets
// the consumer run; after the consumer has finished NT output vectors
// (counted on its vec_done pulse) wgt_ok drops and the next sequence's
// words are accepted.  The weights are therefore single-buffered and the
// producer is stalled meanwhile.  The mapping follows the document's drawing
// of self-attention; the counters, the single buffer and the hand-over rule
// are this design's choice.  w_data is the input word passed straight
// through (the consumer registers it), so it has no logic of its own.
module attn_weight_loader
  import attae_pkg::*;
#(
  parameter int unsigned NT        = NTS,
  parameter int unsigned D         = D_MODEL,
  parameter bit          TRANSPOSE = 1'b0,
  parameter int unsigned WA_W      = $clog2(NT * D + ((TRANSPOSE != 0) ? D : NT) + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  q_t              in_data,
  input  logic            in_valid,
  output logic            in_ready,
  output logic            w_we,
  output logic [WA_W-1:0] w_addr,
  output q_t              w_data,
  output logic            wgt_ok,
  input  logic            vec_done
);
  localparam int unsigned JW = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned IW = (D  > 1) ? $clog2(D)  : 1;
  localparam int unsigned UW = $clog2(NT + 1);

  logic [JW-1:0] j_cnt;
  logic [IW-1:0] i_cnt;
  logic [UW-1:0] used;
  logic          take, last_word, ok_q;

  assign in_ready  = !ok_q;
  // Drops in the very cycle the last vector completes, so that the consumer
  // cannot take a word of the next sequence with the old weights.
  assign wgt_ok    = ok_q && !(vec_done && (used == UW'(NT - 1)));
  assign take      = in_valid && in_ready;
  assign last_word = (j_cnt == JW'(NT - 1)) && (i_cnt == IW'(D - 1));

  // Address of the word being taken.
  always_comb begin
    if (TRANSPOSE) w_addr = WA_W'(32'(i_cnt) * NT + 32'(j_cnt));
    else           w_addr = WA_W'(32'(j_cnt) * D  + 32'(i_cnt));
  end
  assign w_we   = take;
  assign w_data = in_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j_cnt  <= '0;
      i_cnt  <= '0;
      used   <= '0;
      ok_q   <= 1'b0;
    end else if (!ok_q) begin
      if (take) begin
        if (i_cnt == IW'(D - 1)) begin
          i_cnt <= '0;
          j_cnt <= (j_cnt == JW'(NT - 1)) ? '0 : j_cnt + JW'(1);
        end else begin
          i_cnt <= i_cnt + IW'(1);
        end
        if (last_word) begin
          ok_q   <= 1'b1;
          used   <= '0;
        end
      end
    end else if (vec_done) begin
      if (used == UW'(NT - 1)) ok_q <= 1'b0;
      used <= used + UW'(1);
    end
  end
endmodule
