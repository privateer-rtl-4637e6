// layer_norm -- layer normalisation of each D-word vector of a stream.
//
// For every timestep the stage takes D Q8.24 words x[0..D-1] and returns
//   y[d] = gamma[d] * (x[d] - mean) / sqrt(var + eps) + beta[d]
// with mean and (biased) variance taken over the D words.  Phases:
//   1. LOAD  buffer the words while summing them;
//   2. MEAN  mean = sum / D;
//   3. VAR   second pass over the buffer: var = sum((x - mean)^2) / D at
//            full Q.48 precision (no cancellation), plus eps;
//   4. SQRT  std = isqrt(var) by the bit-by-bit square root, two radicand
//            bits per clock, 32 cycles; the square root of a Q.48 number is
//            directly Q.24;
//   5. DIV   rstd = 2^48 / std by the sequential divider (49 cycles);
//   6. EMIT  y[d] = ((x[d] - mean) * rstd) * gamma[d] + beta[d], one word
//            per output handshake, saturated to Q8.24.
// gamma (write address d) and beta (address D + d) are loaded with the model
// weights and reset to 1.0 and 0.0.  A vector takes about 3D + 85 cycles and
// vectors are not overlapped.  The document names a dedicated LayerNorm
// module; the two-pass statistics, the square-root and divider circuits and
// eps = 1e-5 are this design's choices.
module layer_norm
  import attae_pkg::*;
#(
  parameter int unsigned D     = D_MODEL,
  parameter int unsigned EPS   = 168,        // eps in Q8.24 (about 1e-5)
  parameter int unsigned WA_W  = $clog2(2 * D + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  q_t              in_data,
  input  logic            in_valid,
  output logic            in_ready,
  output q_t              out_data,
  output logic            out_valid,
  input  logic            out_ready,
  input  logic            w_we,
  input  logic [WA_W-1:0] w_addr,
  input  q_t              w_data
);
  localparam int unsigned IW = (D > 1) ? $clog2(D) : 1;

  typedef enum logic [2:0] {S_LOAD, S_MEAN, S_VAR, S_STAT, S_SQRT, S_DIV, S_EMIT} state_e;
  state_e state;

  q_t                   xbuf  [D];
  q_t                   gamma [D];
  q_t                   beta  [D];
  logic [IW-1:0]        idx;
  logic signed [47:0]   sum;        // Q.24
  logic        [79:0]   sumsq;      // Q.48, non-negative
  q_t                   mean;
  logic        [63:0]   rad;        // variance + eps, Q.48
  logic        [33:0]   rem;
  logic        [31:0]   root;       // standard deviation, Q.24
  logic        [4:0]    sq_cnt;
  logic                 div_start, div_done;
  logic        [48:0]   rstd;       // 1 / std, Q.24

  seq_recip #(.DEN_W(32), .NUM_SH(48)) u_div (
    .clk, .rst_n, .start(div_start), .den(root), .busy(),
    .done(div_done), .quot(rstd));

  // Parameter write port.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 0; d < D; d++) begin
        gamma[d] <= Q_ONE;
        beta[d]  <= '0;
      end
    end else if (w_we) begin
      if (w_addr < WA_W'(D))          gamma[IW'(w_addr)]            <= w_data;
      else if (w_addr < WA_W'(2 * D)) beta[IW'(w_addr - WA_W'(D))] <= w_data;
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_EMIT);

  // Output of the current word.
  always_comb begin
    logic signed [95:0] n;
    q_t                 nq;
    n  = 96'(33'(xbuf[idx]) - 33'(mean)) * 96'(signed'({1'b0, rstd}));
    nq = q_t'(sat_q(80'(n >>> FRAC_W)));
    out_data = qadd(qmul(nq, gamma[idx]), beta[idx]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      idx       <= '0;
      sum       <= '0;
      sumsq     <= '0;
      mean      <= '0;
      rad       <= '0;
      rem       <= '0;
      root      <= '0;
      sq_cnt    <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          xbuf[idx] <= in_data;
          sum       <= sum + 48'(in_data);
          if (idx == IW'(D - 1)) begin
            idx   <= '0;
            state <= S_MEAN;
          end else begin
            idx <= idx + IW'(1);
          end
        end
        S_MEAN: begin
          mean  <= q_t'(sum / $signed(48'(D)));
          sumsq <= '0;
          idx   <= '0;
          state <= S_VAR;
        end
        S_VAR: begin
          logic signed [32:0] dx;
          dx    = 33'(xbuf[idx]) - 33'(mean);
          sumsq <= sumsq + 80'(unsigned'(66'(dx) * 66'(dx)));
          if (idx == IW'(D - 1)) begin
            idx   <= '0;
            state <= S_STAT;
          end else begin
            idx <= idx + IW'(1);
          end
        end
        S_STAT: begin
          logic [79:0] v;
          v      = sumsq / 80'(D) + (80'(EPS) << FRAC_W);
          rad    <= (v > 80'(64'hFFFF_FFFF_FFFF_FFFF)) ? '1 : v[63:0];
          rem    <= '0;
          root   <= '0;
          sq_cnt <= 5'd31;
          state  <= S_SQRT;
        end
        S_SQRT: begin
          logic [35:0] r, trial;
          r     = {rem, rad[63:62]};
          trial = {2'b00, root, 2'b01};
          if (r >= trial) begin
            rem  <= 34'(r - trial);
            root <= {root[30:0], 1'b1};
          end else begin
            rem  <= 34'(r);
            root <= {root[30:0], 1'b0};
          end
          rad <= rad << 2;
          if (sq_cnt == '0) begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
          sq_cnt <= sq_cnt - 5'd1;
        end
        S_DIV: if (div_done) state <= S_EMIT;
        S_EMIT: if (out_ready) begin
          if (idx == IW'(D - 1)) begin
            idx   <= '0;
            sum   <= '0;
            sumsq <= '0;
            state <= S_LOAD;
          end else begin
            idx <= idx + IW'(1);
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
