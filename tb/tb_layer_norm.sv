// tb_layer_norm -- self-checking test of the LayerNorm stage.
//
// Loads random gamma/beta, feeds 30 vectors of 32 random Q8.24 words with
// different offsets and spreads (including a constant vector, where only eps
// keeps the division finite) and compares each output with
// gamma*(x-mean)/sqrt(var+1e-5)+beta computed here in floating point.  The
// tolerance is 2e-4 plus 1e-5 of the value.  The first vectors run with the
// reset defaults (gamma = 1, beta = 0).  Output back-pressure is random.
module tb_layer_norm;
  import attae_pkg::*;
  localparam int D = 32;
  localparam int VECS = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit hs1, hs2;  // handshake seen at the clock edge

  q_t in_data, out_data, w_data; logic in_valid, in_ready, out_valid, out_ready, w_we;
  logic [$clog2(2*D+1)-1:0] w_addr;
  layer_norm #(.D(D)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t  xq [VECS][D];
  real g [D], b [D];
  q_t  gq [D], bq [D];
  bit  loaded = 0;
  real x [D];

  initial begin
    for (int v = 0; v < VECS; v++) begin
      real off, spr;
      off = (real'($urandom % 2001) / 1000.0 - 1.0) * 20.0;
      spr = (v % 3 == 0) ? 0.05 : (v % 3 == 1) ? 1.0 : 10.0;
      for (int d = 0; d < D; d++) begin
        xq[v][d] = q_t'($rtoi((off + (real'($urandom % 2001) / 1000.0 - 1.0) * spr) * 16777216.0));
        if (v == 7) xq[v][d] = 32'sh02000000;
      end
    end
    for (int d = 0; d < D; d++) begin
      gq[d] = q_t'($rtoi((real'($urandom % 2001) / 1000.0 - 1.0) * 2.0 * 16777216.0));
      bq[d] = q_t'($rtoi((real'($urandom % 2001) / 1000.0 - 1.0) * 1.0 * 16777216.0));
      g[d] = real'(gq[d]) / 16777216.0;
      b[d] = real'(bq[d]) / 16777216.0;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; w_we = 0; w_addr = '0; w_data = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int v = 0; v < VECS; v++) begin
      if (v == 4) begin
        // wait until the stage is idle, then load gamma and beta
        wait (in_ready && !out_valid);
        @(posedge clk);
        in_valid <= 0;
        for (int d = 0; d < 2 * D; d++) begin
          w_we <= 1; w_addr <= $bits(w_addr)'(d); w_data <= (d < D) ? gq[d] : bq[d - D];
          @(posedge clk);
        end
        w_we <= 0;
        loaded = 1;
              end
      for (int d = 0; d < D; d++) begin
        in_valid <= 1; in_data <= xq[v][d];
        do begin @(negedge clk); hs1 = in_ready; @(posedge clk); end while (!hs1);
      end
      if (v == 3) begin
        in_valid <= 0;
        repeat (200) @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  initial begin
    out_ready = 0;
    @(posedge rst_n);
    for (int v = 0; v < VECS; v++) begin
      real m, var_;
      m = 0.0; var_ = 0.0;
      for (int d = 0; d < D; d++) begin x[d] = real'(xq[v][d]) / 16777216.0; m += x[d]; end
      m /= D;
      for (int d = 0; d < D; d++) var_ += (x[d] - m) * (x[d] - m);
      var_ /= D;
      for (int d = 0; d < D; d++) begin
        real e, gg, tol;
        do begin
          out_ready <= ($urandom % 3 != 0);
          @(negedge clk); hs2 = out_valid && out_ready;
          @(posedge clk);
        end while (!hs2);
        e = (x[d] - m) / $sqrt(var_ + 1e-5);
        if (v >= 4) e = e * g[d] + b[d];
        gg = real'(out_data) / 16777216.0;
        tol = 2e-4 + 1e-5 * ((e < 0) ? -e : e);
        checks++;
        if (gg - e > tol || e - gg > tol) begin
          failures++;
          $display("vec %0d d %0d: got %f exp %f", v, d, gg, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
