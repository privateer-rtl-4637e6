// linear_layer -- fully connected layer: a broadcast input feeding an array of
// multiply-accumulate processing elements (PEs).
//
// For every timestep the layer reads F_IN Q8.24 activations, one per
// handshake, and produces F_OUT Q8.24 outputs:
//     out[y] = bias[y] + sum_x in[x] * w[y][x]
// Structure (following the linear-layer accelerator of the design): each
// accepted activation is captured in an input register and broadcast, on the
// next cycle, to N_PE PEs.  PE p owns a local weight memory and
// accumulators; it multiplies the broadcast value by its weight and adds the
// full-precision Q16.48 product to the accumulator.  With the default
// N_PE = F_OUT (one PE per output, fully unrolled) all outputs are updated in
// the same cycle and the layer consumes one activation per clock.  With
// fewer PEs the outputs are split into T = ceil(F_OUT / N_PE) tiles, output
// y belonging to PE y % N_PE in tile y / N_PE: the activation is held and
// issued once per tile on T consecutive cycles, so the layer takes one
// activation every T clocks with N_PE multipliers instead of F_OUT.
//
// After the F_IN-th activation the sums are rounded down to Q8.24,
// saturated and moved into an output register bank (the next timestep's
// first product is added to the bias instead of the old sum), and the bank
// is drained one word per handshake, output 0 first, while the next
// timestep already accumulates.  The input stalls only when a new sum is
// ready while the bank is still draining (F_OUT > F_IN, or back-pressure on
// the output).  The first output word appears T + 1 cycles after the last
// activation of a timestep.
//
// Weights and biases are written through a single write port:
// address y*F_IN + x holds w[y][x], address F_OUT*F_IN + y holds bias[y],
// whatever N_PE is.  Biases reset to zero; weights are not reset.  The layer
// only accepts input while wgt_ok is high, which lets a weight loader hold
// it off until run-time weights (the keys and values in self-attention) are
// in place.  vec_done pulses for one cycle when the last product of a
// timestep has been added.
//
// The broadcast PE array, the bias-initialised accumulators and the number
// of PEs as a compile-time parameter follow the document (its main
// configuration is fully unrolled, which is the default here); the
// two-stage timing, the tile order, the serial output order and the
// write-port address map are this design's.
module linear_layer
  import attae_pkg::*;
#(
  parameter int unsigned F_IN  = 8,
  parameter int unsigned F_OUT = 32,
  parameter int unsigned N_PE  = F_OUT,                // processing elements
  parameter int unsigned ACC_W = 72,                   // accumulator width (Q.48)
  parameter int unsigned WA_W  = $clog2(F_OUT * F_IN + F_OUT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // input activation stream
  input  q_t              in_data,
  input  logic            in_valid,
  output logic            in_ready,
  // output stream, F_OUT words per timestep
  output q_t              out_data,
  output logic            out_valid,
  input  logic            out_ready,
  // weight / bias write port
  input  logic            w_we,
  input  logic [WA_W-1:0] w_addr,
  input  q_t              w_data,
  input  logic            wgt_ok,
  output logic            vec_done
);
  localparam int unsigned T  = (F_OUT + N_PE - 1) / N_PE;   // tiles
  localparam int unsigned XW = (F_IN  > 1) ? $clog2(F_IN)  : 1;
  localparam int unsigned YW = (F_OUT > 1) ? $clog2(F_OUT) : 1;
  localparam int unsigned PW = (N_PE  > 1) ? $clog2(N_PE)  : 1;
  localparam int unsigned KW = (T     > 1) ? $clog2(T)     : 1;
  localparam int unsigned MW = (T * F_IN > 1) ? $clog2(T * F_IN) : 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  // Output y is handled by PE y % N_PE in tile y / N_PE.  Each PE owns a
  // weight memory of T*F_IN words (tile-major) and T accumulators.
  q_t   wmem [N_PE][T * F_IN];
  q_t   bias [T][N_PE];
  acc_t acc  [T][N_PE];
  q_t   obuf [T][N_PE];
  q_t   wrd  [N_PE];    // weights read for the issued (activation, tile)

  // Issue: the accepted activation goes out at once for tile 0 and is held
  // for tiles 1 .. T-1.
  logic          take, holding;
  q_t            hold_d;
  logic [XW-1:0] hold_x, x_cnt;
  logic [KW-1:0] kt;
  logic          iss_v;
  q_t            iss_d;
  logic [XW-1:0] iss_x;
  logic [KW-1:0] iss_k;

  // Stage 1 register (input R of the PE array).
  logic          s1_valid, s1_first, s1_tlast, s1_last;
  q_t            s1_data;
  logic [KW-1:0] s1_k;

  // Output bank.
  logic          ob_busy;
  logic [YW-1:0] ob_idx;

  assign take     = in_valid && in_ready;
  // The last activation of a timestep is only taken once the output bank
  // is free, so the finished sums always have somewhere to go.
  assign in_ready = wgt_ok && !holding && !((x_cnt == XW'(F_IN - 1)) && ob_busy);

  assign iss_v = take || holding;
  assign iss_d = holding ? hold_d : in_data;
  assign iss_x = holding ? hold_x : x_cnt;
  assign iss_k = holding ? kt : '0;

  // Weight write port: w[y][x] goes to PE y % N_PE, entry (y / N_PE)*F_IN + x.
  logic [PW-1:0] wr_pe;
  logic [MW-1:0] wr_ent;
  always_comb begin
    wr_pe  = PW'((w_addr / WA_W'(F_IN)) % WA_W'(N_PE));
    wr_ent = MW'((w_addr / WA_W'(F_IN * N_PE)) * WA_W'(F_IN) + w_addr % WA_W'(F_IN));
  end

  always_ff @(posedge clk) begin
    if (w_we && (w_addr < WA_W'(F_OUT * F_IN))) wmem[wr_pe][wr_ent] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < T; k++)
        for (int p = 0; p < N_PE; p++) bias[k][p] <= '0;
    end else if (w_we && (w_addr >= WA_W'(F_OUT * F_IN))
                      && (w_addr < WA_W'(F_OUT * F_IN + F_OUT))) begin
      bias[KW'((w_addr - WA_W'(F_OUT * F_IN)) / WA_W'(N_PE))]
          [PW'((w_addr - WA_W'(F_OUT * F_IN)) % WA_W'(N_PE))] <= w_data;
    end
  end

  // Stage 1: capture the activation and read each PE's weight.
  always_ff @(posedge clk) begin
    if (iss_v) begin
      s1_data <= iss_d;
      s1_k    <= iss_k;
      for (int p = 0; p < N_PE; p++)
        wrd[p] <= wmem[p][MW'(32'(iss_k) * F_IN + 32'(iss_x))];
    end
    if (take) begin
      hold_d <= in_data;
      hold_x <= x_cnt;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_tlast <= 1'b0;
      s1_last  <= 1'b0;
      x_cnt    <= '0;
      holding  <= 1'b0;
      kt       <= '0;
    end else begin
      s1_valid <= iss_v;
      s1_first <= iss_v && (iss_x == '0);
      s1_tlast <= iss_v && (iss_x == XW'(F_IN - 1));
      s1_last  <= iss_v && (iss_x == XW'(F_IN - 1)) && (iss_k == KW'(T - 1));
      if (take) x_cnt <= (x_cnt == XW'(F_IN - 1)) ? '0 : x_cnt + XW'(1);
      if (iss_v) begin
        if (T == 1 || iss_k == KW'(T - 1)) begin
          holding <= 1'b0;
          kt      <= '0;
        end else begin
          holding <= 1'b1;
          kt      <= iss_k + KW'(1);
        end
      end
    end
  end

  // Stage 2: the PE array.
  function automatic acc_t bias_acc(input q_t b);
    return acc_t'(b) <<< FRAC_W;
  endfunction

  function automatic q_t to_q(input acc_t a);
    acc_t s;
    s = a >>> FRAC_W;
    if (s > acc_t'(Q_MAX)) return Q_MAX;
    if (s < acc_t'(Q_MIN)) return Q_MIN;
    return s[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < T; k++)
        for (int p = 0; p < N_PE; p++) acc[k][p] <= '0;
      ob_busy <= 1'b0;
      ob_idx  <= '0;
    end else begin
      if (s1_valid) begin
        for (int p = 0; p < N_PE; p++) begin
          acc_t sum;
          // The first activation of a timestep starts from the bias.
          sum = (s1_first ? bias_acc(bias[s1_k][p]) : acc[s1_k][p])
              + acc_t'(p_t'(s1_data) * p_t'(wrd[p]));
          acc[s1_k][p] <= sum;
          if (s1_tlast) obuf[s1_k][p] <= to_q(sum);
        end
      end
      if (s1_valid && s1_last) begin
        ob_busy <= 1'b1;
        ob_idx  <= '0;
      end else if (ob_busy && out_ready) begin
        if (ob_idx == YW'(F_OUT - 1)) ob_busy <= 1'b0;
        else                          ob_idx  <= ob_idx + YW'(1);
      end
    end
  end

  assign out_valid = ob_busy;
  assign out_data  = obuf[KW'(32'(ob_idx) / N_PE)][PW'(32'(ob_idx) % N_PE)];
  assign vec_done  = s1_valid && s1_last;
endmodule
