// tb_pos_encoding -- self-checking test of the positional-encoding adder.
//
// Loads a 12 x 32 table of sinusoidal offsets (sin for even features, cos for
// odd ones, the usual transformer encoding) computed here, streams three
// sequences of random words through the stage with random input gaps and
// output back-pressure, and checks every output word against
// saturate(x + pe[t][d]) for its position, including the wrap from one
// sequence to the next and saturation at the top of the range.
module tb_pos_encoding;
  import attae_pkg::*;
  localparam int NT = 12, D = 32, WORDS = 3 * NT * D;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t in_data, out_data, w_data; logic in_valid, in_ready, out_valid, out_ready, w_we;
  logic [$clog2(NT*D+1)-1:0] w_addr;
  pos_encoding #(.NT(NT), .D(D)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t pe [NT][D];
  q_t xs [WORDS];
  int n_in = 0, n_out = 0;
  bit run = 0;

  function automatic q_t sat_add(input q_t a, input q_t b);
    longint s;
    s = longint'(a) + longint'(b);
    if (s > 64'sd2147483647) return 32'sh7fffffff;
    if (s < -64'sd2147483648) return 32'sh80000000;
    return q_t'(s);
  endfunction

  always @(negedge clk) if (run) begin
    in_valid  <= (n_in < WORDS) && ($urandom % 4 != 0);
    in_data   <= xs[(n_in < WORDS) ? n_in : 0];
    out_ready <= ($urandom % 4 != 0);
  end

  always @(posedge clk) if (run) begin
    if (in_valid && in_ready) n_in++;
    if (out_valid && out_ready) begin
      int t, d;
      t = (n_out / D) % NT; d = n_out % D;
      checks++;
      if (out_data !== sat_add(xs[n_out], pe[t][d])) begin
        failures++;
        $display("word %0d: got %h exp %h", n_out, out_data, sat_add(xs[n_out], pe[t][d]));
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; w_we = 0; w_addr = '0; w_data = '0;
    for (int t = 0; t < NT; t++)
      for (int d = 0; d < D; d++) begin
        real ang;
        ang = real'(t) / $pow(10000.0, real'(2 * (d / 2)) / real'(D));
        pe[t][d] = q_t'($rtoi(((d % 2 == 0) ? $sin(ang) : $cos(ang)) * 16777216.0));
      end
    for (int i = 0; i < WORDS; i++) xs[i] = q_t'(int'($urandom) >>> 2);
    xs[5] = 32'sh7fff0000;   // saturates against a positive offset
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int a = 0; a < NT * D; a++) begin
      w_we <= 1; w_addr <= $bits(w_addr)'(a); w_data <= pe[a / D][a % D];
      @(posedge clk);
    end
    w_we <= 0;
    @(posedge clk);
    run = 1;
    wait (n_out == WORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
