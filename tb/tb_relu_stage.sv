// tb_relu_stage -- self-checking test of the ReLU stage.
//
// Streams 2000 random words (about half negative, plus zero and the extreme
// values) through the stage with random input gaps and output back-pressure,
// checks each output against max(x, 0) in order, and checks that with the
// output always ready the stage passes one word per clock with one cycle of
// latency.
module tb_relu_stage;
  import attae_pkg::*;
  localparam int WORDS = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t in_data, out_data; logic in_valid, in_ready, out_valid, out_ready;
  relu_stage dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t xs [WORDS];
  int n_in = 0, n_out = 0;
  bit run = 0, stress = 1;
  longint cyc = 0, in_cyc [WORDS];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (run) begin
    in_valid  <= (n_in < WORDS) && (!stress || $urandom % 4 != 0);
    in_data   <= xs[(n_in < WORDS) ? n_in : 0];
    out_ready <= !stress || ($urandom % 4 != 0);
  end

  always @(posedge clk) if (run) begin
    if (in_valid && in_ready) begin in_cyc[n_in] = cyc; n_in++; end
    if (out_valid && out_ready) begin
      q_t e;
      e = (xs[n_out] < 0) ? '0 : xs[n_out];
      checks++;
      if (out_data !== e) begin
        failures++;
        $display("word %0d: got %h exp %h", n_out, out_data, e);
      end
      if (!stress) begin
        checks++;
        if (cyc - in_cyc[n_out] != 1) begin
          failures++;
          $display("word %0d latency %0d", n_out, cyc - in_cyc[n_out]);
        end
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    for (int i = 0; i < WORDS; i++) xs[i] = q_t'($urandom);
    xs[1] = '0; xs[2] = 32'sh7fffffff; xs[3] = 32'sh80000000; xs[4] = -1;
    repeat (3) @(posedge clk); rst_n <= 1;
    run = 1;
    wait (n_out == WORDS / 2);
    stress = 0;
    wait (n_out == WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
