// tb_stream_fifo -- self-checking test of the dataflow FIFO.
//
// A depth-12 FIFO (not a power of two) is filled until it refuses input,
// drained until it is empty, then run for 2000 cycles with random write and
// read activity.  A queue in the testbench models the contents; every word
// read, the ready/valid flags and the occupancy count are compared with it.
module tb_stream_fifo;
  localparam int W = 32, DEPTH = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] in_data, out_data; logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(DEPTH+1)-1:0] count;
  stream_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [$];
  int phase;   // 0 fill, 1 drain, 2 random
  int full_seen = 0, empty_seen = 0;

  // Decide the next cycle's activity at the falling edge, check at it too.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (count != $bits(count)'(model.size()) || in_ready != (model.size() < DEPTH)
        || out_valid != (model.size() > 0)) begin
      failures++;
      $display("flags: count %0d model %0d ir %0d ov %0d", count, model.size(), in_ready, out_valid);
    end
    if (out_valid) begin
      checks++;
      if (out_data !== model[0]) begin
        failures++;
        $display("data %h exp %h", out_data, model[0]);
      end
    end
    if (model.size() == DEPTH) full_seen++;
    in_data   <= $urandom;
    in_valid  <= (phase == 0) ? 1'b1 : (phase == 1) ? 1'b0 : ($urandom % 2 == 1);
    out_ready <= (phase == 0) ? 1'b0 : (phase == 1) ? 1'b1 : ($urandom % 2 == 1);
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) void'(model.pop_front());
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0; phase = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (DEPTH + 5) @(posedge clk);
    phase = 1;
    repeat (DEPTH + 5) @(posedge clk);
    checks++;
    if (out_valid || count != 0) begin failures++; $display("not empty after drain"); end
    phase = 2;
    repeat (2000) @(posedge clk);
    checks++;
    if (full_seen == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
