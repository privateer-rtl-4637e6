// tb_attn_weight_loader -- self-checking test of the attention weight loader.
//
// Two loaders (keys: no transpose; values: transpose) receive three
// sequences of 12 x 32 words with random gaps.  Every weight write must go to
// address j*32 + i (keys) or i*12 + j (values) for element (j, i) of the
// sequence, with that element's value; wgt_ok must rise exactly after the
// last element, input must be refused while wgt_ok is high, and wgt_ok must
// drop in the same cycle as the 12th vec_done pulse of the consumer.
module tb_attn_weight_loader;
  import attae_pkg::*;
  localparam int NT = 12, D = 32, N = NT * D, NSEQ = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  q_t k_in, v_in, kw_data, vw_data;
  logic k_valid, k_ready, v_valid, v_ready, kw_we, vw_we, k_ok, v_ok, k_done, v_done;
  logic [8:0] kw_addr, vw_addr;

  attn_weight_loader #(.NT(NT), .D(D), .TRANSPOSE(1'b0)) dut_k (
    .clk, .rst_n, .in_data(k_in), .in_valid(k_valid), .in_ready(k_ready),
    .w_we(kw_we), .w_addr(kw_addr), .w_data(kw_data), .wgt_ok(k_ok), .vec_done(k_done));
  attn_weight_loader #(.NT(NT), .D(D), .TRANSPOSE(1'b1)) dut_v (
    .clk, .rst_n, .in_data(v_in), .in_valid(v_valid), .in_ready(v_ready),
    .w_we(vw_we), .w_addr(vw_addr), .w_data(vw_data), .wgt_ok(v_ok), .vec_done(v_done));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  q_t data [NSEQ * N];
  int nk = 0, nv = 0, dk = 0, dv = 0;   // words taken, vec_done pulses given
  bit run = 0;

  always @(negedge clk) if (run) begin
    k_valid <= (nk < NSEQ * N) && ($urandom % 4 != 0);
    k_in    <= data[(nk < NSEQ * N) ? nk : 0];
    v_valid <= (nv < NSEQ * N) && ($urandom % 4 != 0);
    v_in    <= data[(nv < NSEQ * N) ? nv : 0];
    // the consumer finishes a vector now and then while the weights are held
    k_done  <= k_ok && ($urandom % 5 == 0);
    v_done  <= v_ok && ($urandom % 5 == 0);
  end

  always @(posedge clk) if (run) begin
    // the loader must refuse input while its weights are in use
    checks += 2;
    if (k_ok && k_ready) begin failures++; $display("key loader ready while holding"); end
    if (v_ok && v_ready) begin failures++; $display("value loader ready while holding"); end
    if (kw_we) begin
      int e, j, i;
      e = nk % N; j = e / D; i = e % D;
      checks++;
      if (!(k_valid && k_ready) || kw_addr != 9'(j * D + i) || kw_data !== data[nk]) begin
        failures++; $display("key write %0d: addr %0d", nk, kw_addr);
      end
    end
    if (vw_we) begin
      int e, j, i;
      e = nv % N; j = e / D; i = e % D;
      checks++;
      if (!(v_valid && v_ready) || vw_addr != 9'(i * NT + j) || vw_data !== data[nv]) begin
        failures++; $display("value write %0d: addr %0d", nv, vw_addr);
      end
    end
    if (k_valid && k_ready) nk++;
    if (v_valid && v_ready) nv++;
    if (k_done) begin
      dk++;
      checks++;
      if ((dk % NT == 0) == k_ok) begin failures++; $display("key wgt_ok wrong at pulse %0d", dk); end
    end
    if (v_done) begin
      dv++;
      checks++;
      if ((dv % NT == 0) == v_ok) begin failures++; $display("value wgt_ok wrong at pulse %0d", dv); end
    end
  end

  // wgt_ok must rise right after the last word of a sequence
  logic k_ok_q = 0;
  always @(posedge clk) if (run) begin
    k_ok_q <= k_ok;
    if (k_ok && !k_ok_q) begin
      checks++;
      if (nk % N != 0 || nk == 0) begin failures++; $display("key ok rose after %0d words", nk); end
    end
  end

  initial begin
    k_valid = 0; v_valid = 0; k_in = '0; v_in = '0; k_done = 0; v_done = 0;
    foreach (data[i]) data[i] = q_t'($urandom);
    repeat (3) @(posedge clk); rst_n <= 1;
    run = 1;
    wait (nk == NSEQ * N && nv == NSEQ * N && dk == NSEQ * NT && dv == NSEQ * NT);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
