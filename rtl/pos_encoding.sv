// pos_encoding -- adds a position-dependent offset to every embedded word.
//
// The embedding Linear layer emits, for each of the NTS timesteps of a
// sequence, D_MODEL words.  This stage keeps a table pe[t][d] of NTS*D_MODEL
// Q8.24 offsets and adds pe[t][d] to word d of timestep t, so that later
// layers can tell the timesteps apart.  Two counters track (t, d) and wrap at
// the end of a sequence.  The table is written through the port
// (address t*D_MODEL + d) together with the model weights, so the stage
// serves a sinusoidal as well as a learned encoding; the document names the
// operation but gives no formula, so the loadable table is this design's
// choice.  One word per clock, one cycle of latency, saturating addition.
module pos_encoding
  import attae_pkg::*;
#(
  parameter int unsigned NT   = NTS,
  parameter int unsigned D    = D_MODEL,
  parameter int unsigned WA_W = $clog2(NT * D + 1)
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
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned DW = (D  > 1) ? $clog2(D)  : 1;

  q_t            table_q [NT][D];
  logic [TW-1:0] t_cnt;
  logic [DW-1:0] d_cnt;
  logic          take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (w_we && (w_addr < WA_W'(NT * D)))
      table_q[TW'(w_addr / WA_W'(D))][DW'(w_addr % WA_W'(D))] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      t_cnt     <= '0;
      d_cnt     <= '0;
    end else begin
      if (in_ready) out_valid <= in_valid;
      if (take) begin
        out_data <= qadd(in_data, table_q[t_cnt][d_cnt]);
        if (d_cnt == DW'(D - 1)) begin
          d_cnt <= '0;
          t_cnt <= (t_cnt == TW'(NT - 1)) ? '0 : t_cnt + TW'(1);
        end else begin
          d_cnt <= d_cnt + DW'(1);
        end
      end
    end
  end
endmodule
