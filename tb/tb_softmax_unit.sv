// tb_softmax_unit -- self-checking test of the row-wise softmax stage.
//
// Feeds rows of 12 random Q8.24 scores (spread over several ranges, plus a
// row of equal scores and one with a dominant score), compares each output
// with exp(s_i - max) / sum_j exp(s_j - max) computed here in floating point,
// and requires an absolute error below 2e-5 and each row to sum to 1 within
// 1e-4.  Output back-pressure is applied at random.
module tb_softmax_unit;
  import attae_pkg::*;
  localparam int N = 12;
  localparam int ROWS = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit hs1, hs2;  // handshake seen at the clock edge

  q_t in_data, out_data; logic in_valid, in_ready, out_valid, out_ready;
  softmax_unit #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    sc [ROWS][N];
  q_t     sq [ROWS][N];

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      real range;
      range = (r % 4 == 0) ? 0.5 : (r % 4 == 1) ? 4.0 : (r % 4 == 2) ? 20.0 : 100.0;
      for (int i = 0; i < N; i++) begin
        sq[r][i] = q_t'($rtoi(((real'($urandom % 20001) / 10000.0) - 1.0) * range * 16777216.0));
        if (r == 5) sq[r][i] = 32'sh01000000;                  // all equal
        if (r == 6) sq[r][i] = (i == 3) ? 32'sh30000000 : -32'sh30000000;
        sc[r][i] = real'(sq[r][i]) / 16777216.0;
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < N; i++) begin
        in_valid <= 1; in_data <= sq[r][i];
        do begin @(negedge clk); hs1 = in_ready; @(posedge clk); end while (!hs1);
      end
    in_valid <= 0;
  end

  initial begin
    out_ready = 0;
    @(posedge rst_n);
    for (int r = 0; r < ROWS; r++) begin
      real m, s, tot;
      m = sc[r][0];
      for (int i = 1; i < N; i++) if (sc[r][i] > m) m = sc[r][i];
      s = 0.0;
      for (int i = 0; i < N; i++) s += $exp(sc[r][i] - m);
      tot = 0.0;
      for (int i = 0; i < N; i++) begin
        real e, g;
        do begin
          out_ready <= ($urandom % 3 != 0);
          @(negedge clk); hs2 = out_valid && out_ready;
          @(posedge clk);
        end while (!hs2);
        e = $exp(sc[r][i] - m) / s;
        g = real'(out_data) / 16777216.0;
        tot += g;
        checks++;
        if (g - e > 2e-5 || e - g > 2e-5) begin
          failures++;
          $display("row %0d i %0d: got %f exp %f", r, i, g, e);
        end
      end
      checks++;
      if (tot > 1.0001 || tot < 0.9999) begin
        failures++;
        $display("row %0d sums to %f", r, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
