// softmax_unit -- row-wise softmax over the attention scores.
//
// The score Linear layer emits, for each query timestep, N = NT scores.  The
// unit buffers one row, then normalises it:
//   1. LOAD  take N Q8.24 scores and keep their maximum m;
//   2. EXP   for each score, e_i = 2^((s_i - m) * log2 e), one per clock;
//            the exponent is split into an integer part n <= 0 and a
//            fraction f in [0,1); 2^f comes from a quartic polynomial
//            (Horner form, coefficients below, error below 1e-5) and is then
//            shifted right by -n; the e_i are summed;
//   3. DIV   1/sum by the sequential divider (49 cycles);
//   4. EMIT  p_i = e_i * (1/sum), one word per output handshake.
// Subtracting the maximum keeps every e_i in (0, 1], so nothing overflows.
// A row takes about 3N + 50 cycles; rows are not overlapped.  The document
// only names a dedicated softmax module; the max subtraction, the
// base-2 exponential and the divider are this design's choices.  Any
// 1/sqrt(d) scaling of the scores is expected to be folded into the query
// weights.
module softmax_unit
  import attae_pkg::*;
#(
  parameter int unsigned N = NTS
) (
  input  logic clk,
  input  logic rst_n,
  input  q_t   in_data,
  input  logic in_valid,
  output logic in_ready,
  output q_t   out_data,
  output logic out_valid,
  input  logic out_ready
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  // Q.24 constants: log2(e) and the 2^f polynomial c4..c0.
  localparam logic signed [39:0] LOG2E = 40'sd24204406;
  localparam logic signed [39:0] C4 = 40'sd229456;
  localparam logic signed [39:0] C3 = 40'sd866838;
  localparam logic signed [39:0] C2 = 40'sd4055203;
  localparam logic signed [39:0] C1 = 40'sd11625468;
  localparam logic signed [39:0] C0 = 40'sd16777337;

  typedef enum logic [1:0] {S_LOAD, S_EXP, S_DIV, S_EMIT} state_e;
  state_e state;

  q_t            buf_q [N];
  q_t            mx;
  logic [IW-1:0] idx;
  logic [39:0]   sum;
  logic          div_start, div_done;
  logic [48:0]   recip;

  // exp(z) for z <= 0, z a 33-bit Q.24 difference.
  function automatic q_t exp_neg(input logic signed [32:0] z);
    logic signed [79:0] y;
    logic signed [39:0] n, f, r;
    y = 80'(z) * 80'(LOG2E);
    y = y >>> FRAC_W;                 // z * log2 e, Q.24, <= 0
    n = 40'(y >>> FRAC_W);            // floor
    f = 40'(y) - (n <<< FRAC_W);      // fraction in [0, 1)
    r = C4;
    r = 40'(((80'(r) * 80'(f)) >>> FRAC_W) + 80'(C3));
    r = 40'(((80'(r) * 80'(f)) >>> FRAC_W) + 80'(C2));
    r = 40'(((80'(r) * 80'(f)) >>> FRAC_W) + 80'(C1));
    r = 40'(((80'(r) * 80'(f)) >>> FRAC_W) + 80'(C0));  // 2^f, Q.24, in [1, 2)
    if (n < -40'sd31) return '0;
    return q_t'(r >>> (-n));
  endfunction

  seq_recip #(.DEN_W(40), .NUM_SH(48)) u_div (
    .clk, .rst_n, .start(div_start), .den(sum), .busy(),
    .done(div_done), .quot(recip));

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_EMIT);
  always_comb begin
    logic [88:0] p;
    p = 89'(unsigned'(buf_q[idx])) * 89'(recip);
    out_data = q_t'(p >> FRAC_W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      idx       <= '0;
      mx        <= '0;
      sum       <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          buf_q[idx] <= in_data;
          if (idx == '0 || in_data > mx) mx <= in_data;
          if (idx == IW'(N - 1)) begin
            idx   <= '0;
            sum   <= '0;
            state <= S_EXP;
          end else begin
            idx <= idx + IW'(1);
          end
        end
        S_EXP: begin
          q_t e;
          e = exp_neg(33'(buf_q[idx]) - 33'(mx));
          buf_q[idx] <= e;
          sum <= sum + 40'(unsigned'(e));
          if (idx == IW'(N - 1)) begin
            idx       <= '0;
            div_start <= 1'b1;
            state     <= S_DIV;
          end else begin
            idx <= idx + IW'(1);
          end
        end
        S_DIV: if (div_done) state <= S_EMIT;
        S_EMIT: if (out_ready) begin
          if (idx == IW'(N - 1)) begin
            idx   <= '0;
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
