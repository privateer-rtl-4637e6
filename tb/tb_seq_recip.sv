// tb_seq_recip -- self-checking test of the sequential reciprocal divider.
//
// Starts the divider with 300 random 32-bit divisors (spread over all
// magnitudes, plus 1, 2^24, the largest value and zero) and compares the
// quotient with floor(2^48 / den) computed here with 64-bit integers; a
// zero divisor must give all ones.  It also checks that done is raised by
// the 49th (NUM_SH + 1) clock edge after the edge that took start, and that
// busy is high in between.
module tb_seq_recip;
  localparam int DEN_W = 32, NUM_SH = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [DEN_W-1:0] den;
  logic [NUM_SH:0]  quot;
  seq_recip #(.DEN_W(DEN_W), .NUM_SH(NUM_SH)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [DEN_W-1:0] d);
    logic [NUM_SH:0] expect_q;
    int n;
    expect_q = (d == 0) ? '1 : (NUM_SH + 1)'(64'h1_0000_0000_0000 / 64'(d));
    start <= 1'b1; den <= d;
    @(posedge clk);
    start <= 1'b0;
    n = 0;
    do begin
      @(negedge clk);
      n++;
      if (!done && !busy) begin
        failures++;
        $display("busy low before done, den %h", d);
        break;
      end
    end while (!done);
    checks++;
    // n = 1 is the falling edge right after the edge that took start, so
    // done set by the (NUM_SH + 1)-th edge after that one shows at
    // n = NUM_SH + 2
    if (n != NUM_SH + 2) begin
      failures++;
      $display("den %h: done after %0d cycles", d, n - 1);
    end
    checks++;
    if (quot !== expect_q) begin
      failures++;
      $display("den %h: quot %h, expected %h", d, quot, expect_q);
    end
    @(posedge clk);
  endtask

  initial begin
    start = 0; den = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_one(32'd1);
    run_one(32'h0100_0000);
    run_one(32'hFFFF_FFFF);
    run_one(32'd0);
    for (int i = 0; i < 300; i++) begin
      logic [DEN_W-1:0] d;
      d = $urandom;
      d = d >> ($urandom % 32);
      if (d == 0) d = 1;
      run_one(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
