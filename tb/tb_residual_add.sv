// tb_residual_add -- self-checking test of the residual (skip) adder.
//
// Two independent random streams (each with its own random gaps) feed the
// adder while the output sees random back-pressure.  Every output must be
// the saturating sum of the next word of each stream, in order; large
// operands exercise both saturation limits.
module tb_residual_add;
  import attae_pkg::*;
  localparam int WORDS = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t a_data, b_data, out_data;
  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  residual_add dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t as_ [WORDS], bs_ [WORDS];
  int na = 0, nb = 0, n_out = 0, n_sat = 0;
  bit run = 0;

  function automatic q_t sat_add(input q_t a, input q_t b);
    longint s;
    s = longint'(a) + longint'(b);
    if (s > 64'sd2147483647) return 32'sh7fffffff;
    if (s < -64'sd2147483648) return 32'sh80000000;
    return q_t'(s);
  endfunction

  always @(negedge clk) if (run) begin
    a_valid   <= (na < WORDS) && ($urandom % 3 != 0);
    a_data    <= as_[(na < WORDS) ? na : 0];
    b_valid   <= (nb < WORDS) && ($urandom % 3 != 0);
    b_data    <= bs_[(nb < WORDS) ? nb : 0];
    out_ready <= ($urandom % 4 != 0);
  end

  always @(posedge clk) if (run) begin
    if (a_valid && a_ready) na++;
    if (b_valid && b_ready) nb++;
    if (out_valid && out_ready) begin
      q_t e;
      e = sat_add(as_[n_out], bs_[n_out]);
      if (e == 32'sh7fffffff || e == 32'sh80000000) n_sat++;
      checks++;
      if (out_data !== e) begin
        failures++;
        $display("word %0d: got %h exp %h", n_out, out_data, e);
      end
      n_out++;
    end
  end

  initial begin
    a_valid = 0; b_valid = 0; out_ready = 0; a_data = '0; b_data = '0;
    for (int i = 0; i < WORDS; i++) begin
      as_[i] = q_t'($urandom);
      bs_[i] = (i % 8 == 0) ? q_t'($urandom) : q_t'(int'($urandom) >>> 4);
    end
    repeat (3) @(posedge clk); rst_n <= 1;
    run = 1;
    wait (n_out == WORDS);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
