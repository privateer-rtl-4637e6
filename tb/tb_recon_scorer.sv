// tb_recon_scorer -- self-checking test of the reconstruction-error scorer.
//
// Streams eight sequences of 12 x 8 original/reconstruction word pairs with
// independent random gaps and random output back-pressure.  The passed-on
// reconstruction must equal the input reconstruction in order; after each
// sequence the score must equal the mean squared error (computed here with
// 128-bit integers, truncated to Q8.24) and the anomaly flag must equal
// score > threshold.  The threshold is reset to 1.0 and then rewritten.
module tb_recon_scorer;
  import attae_pkg::*;
  localparam int NT = 12, F = 8, W = NT * F, NSEQ = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t x_data, y_data, out_data, thr_data, score;
  logic x_valid, x_ready, y_valid, y_ready, out_valid, out_ready, thr_we, score_valid, anomaly;
  recon_scorer #(.NT(NT), .F(F)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t xs [NSEQ * W], ys [NSEQ * W];
  q_t thr_now;
  int nx = 0, ny = 0, n_out = 0, n_sc = 0, n_anom = 0;
  bit run = 0;

  function automatic q_t exp_score(input int s);
    logic [127:0] acc;
    acc = '0;
    for (int i = 0; i < W; i++) begin
      longint d;
      d = longint'(ys[s * W + i]) - longint'(xs[s * W + i]);
      acc += 128'(d * d);
    end
    acc = (acc / W) >> 24;
    return (acc > 128'h7fffffff) ? 32'sh7fffffff : q_t'(acc[31:0]);
  endfunction

  always @(negedge clk) if (run) begin
    x_valid   <= (nx < NSEQ * W) && ($urandom % 3 != 0);
    x_data    <= xs[(nx < NSEQ * W) ? nx : 0];
    y_valid   <= (ny < NSEQ * W) && ($urandom % 3 != 0);
    y_data    <= ys[(ny < NSEQ * W) ? ny : 0];
    out_ready <= ($urandom % 4 != 0);
  end

  always @(posedge clk) if (run) begin
    if (x_valid && x_ready) nx++;
    if (y_valid && y_ready) ny++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== ys[n_out]) begin failures++; $display("pass-through %0d wrong", n_out); end
      n_out++;
    end
    if (score_valid) begin
      q_t e;
      e = exp_score(n_sc);
      checks += 2;
      if (score !== e) begin failures++; $display("seq %0d score %h exp %h", n_sc, score, e); end
      if (anomaly !== (e > thr_now)) begin failures++; $display("seq %0d anomaly %0d", n_sc, anomaly); end
      if (anomaly) n_anom++;
      n_sc++;
    end
  end

  initial begin
    x_valid = 0; y_valid = 0; out_ready = 0; x_data = '0; y_data = '0; thr_we = 0; thr_data = '0;
    for (int s = 0; s < NSEQ; s++)
      for (int i = 0; i < W; i++) begin
        int amp;
        amp = (s % 3 == 1) ? 3 : 0;   // some sequences reconstruct badly
        xs[s * W + i] = q_t'(int'($urandom) >>> 6);
        ys[s * W + i] = xs[s * W + i] + (q_t'(int'($urandom) >>> 8) <<< amp);
      end
    repeat (3) @(posedge clk); rst_n <= 1;
    thr_now = 32'sh0100_0000;            // reset value 1.0
    run = 1;
    wait (n_sc == 4);
    @(negedge clk);
    thr_we = 1; thr_data = exp_score(4) - 1; // sequence 4 sits just above it
    @(negedge clk);
    thr_we = 0; thr_now = thr_data;
    wait (n_sc == NSEQ && n_out == NSEQ * W);
    checks++;
    if (n_anom == 0 || n_anom == NSEQ) begin failures++; $display("anomaly count %0d", n_anom); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
