// tb_linear_layer -- self-checking test of the broadcast PE-array Linear layer.
//
// Three instances are tested: an expanding layer (8 -> 32, the embedding
// shape), a reducing one (32 -> 8), and the same 8 -> 32 layer tiled onto
// 12 PEs (three passes per activation, the last tile partly unused).  Random Q8.24 weights, biases and
// activations are loaded; the expected outputs are computed here with wide
// integer arithmetic (sum of full products plus the bias, shifted down by 24
// bits and saturated).  The first pass keeps the output always ready and
// checks timing: the first output word appears two cycles after the last
// activation of a timestep is taken (two more cycles for the tiled
// layer), and the reducing layer takes one activation per clock.  A second pass applies random input gaps and output
// back-pressure and checks the values again.
module tb_linear_layer;
  import attae_pkg::*;

  localparam int NT = 6;   // timesteps per pass

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit hs1, hs2, hs3, hs4;  // handshake seen at the clock edge
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q_t rnd_q(input int range_bits);
    int r;
    r = int'($urandom) >>> (32 - range_bits);   // signed, |r| < 2^(range_bits-1)
    return q_t'(r);
  endfunction

  function automatic q_t ref_sat(input logic signed [79:0] v);
    logic signed [79:0] s;
    s = v >>> 24;
    if (s > 80'sd2147483647) return 32'sh7fffffff;
    if (s < -80'sd2147483648) return 32'sh80000000;
    return q_t'(s[31:0]);
  endfunction

  // Instance A: 8 -> 32
  localparam int AI = 8, AO = 32;
  q_t a_in, a_out; logic a_iv, a_ir, a_ov, a_or, a_we, a_vd;
  logic [$clog2(AO*AI+AO+1)-1:0] a_wa; q_t a_wd;
  linear_layer #(.F_IN(AI), .F_OUT(AO)) dut_a (
    .clk, .rst_n, .in_data(a_in), .in_valid(a_iv), .in_ready(a_ir),
    .out_data(a_out), .out_valid(a_ov), .out_ready(a_or),
    .w_we(a_we), .w_addr(a_wa), .w_data(a_wd), .wgt_ok(1'b1), .vec_done(a_vd));

  // Instance B: 32 -> 8
  localparam int BI = 32, BO = 8;
  q_t b_in, b_out; logic b_iv, b_ir, b_ov, b_or, b_we, b_vd;
  logic [$clog2(BO*BI+BO+1)-1:0] b_wa; q_t b_wd;
  linear_layer #(.F_IN(BI), .F_OUT(BO)) dut_b (
    .clk, .rst_n, .in_data(b_in), .in_valid(b_iv), .in_ready(b_ir),
    .out_data(b_out), .out_valid(b_ov), .out_ready(b_or),
    .w_we(b_we), .w_addr(b_wa), .w_data(b_wd), .wgt_ok(1'b1), .vec_done(b_vd));

  // Instance C: 8 -> 32 on 12 PEs (three tiles, the last one partly
  // unused); it shares instance A's weights and write port.
  localparam int CPE = 12, CT = 3;
  q_t c_in, c_out; logic c_iv, c_ir, c_ov, c_or, c_vd;
  linear_layer #(.F_IN(AI), .F_OUT(AO), .N_PE(CPE)) dut_c (
    .clk, .rst_n, .in_data(c_in), .in_valid(c_iv), .in_ready(c_ir),
    .out_data(c_out), .out_valid(c_ov), .out_ready(c_or),
    .w_we(a_we), .w_addr(a_wa), .w_data(a_wd), .wgt_ok(1'b1), .vec_done(c_vd));
  bit hs5, hs6;
  longint c_last_in_cyc [NT]; longint c_first_out_cyc [NT];

  q_t wa [AO][AI]; q_t ba [AO]; q_t xa [NT][AI];
  q_t wb [BO][BI]; q_t bb [BO]; q_t xb [NT][BI];
  q_t ea [NT][AO]; q_t eb [NT][BO];

  task automatic compute_expected();
    for (int t = 0; t < NT; t++) begin
      for (int y = 0; y < AO; y++) begin
        logic signed [79:0] s;
        s = 80'(ba[y]) <<< 24;
        for (int i = 0; i < AI; i++) s += 80'(longint'(xa[t][i]) * longint'(wa[y][i]));
        ea[t][y] = ref_sat(s);
      end
      for (int y = 0; y < BO; y++) begin
        logic signed [79:0] s;
        s = 80'(bb[y]) <<< 24;
        for (int i = 0; i < BI; i++) s += 80'(longint'(xb[t][i]) * longint'(wb[y][i]));
        eb[t][y] = ref_sat(s);
      end
    end
  endtask

  bit stress;
  longint a_last_in_cyc [NT]; longint a_first_out_cyc [NT];
  longint b_first_in, b_last_in;

  // Drivers
  task automatic drive_a();
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < AI; i++) begin
        a_iv <= 1'b1; a_in <= xa[t][i];
        if (stress && ($urandom % 3 == 0)) begin
          a_iv <= 1'b0; @(posedge clk); a_iv <= 1'b1;
        end
        do begin @(negedge clk); hs1 = a_ir; @(posedge clk); end while (!hs1);
        if (i == AI - 1) a_last_in_cyc[t] = cyc - 1;
      end
    a_iv <= 1'b0;
  endtask

  task automatic drive_c();
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < AI; i++) begin
        c_iv <= 1'b1; c_in <= xa[t][i];
        if (stress && ($urandom % 3 == 0)) begin
          c_iv <= 1'b0; @(posedge clk); c_iv <= 1'b1;
        end
        do begin @(negedge clk); hs5 = c_ir; @(posedge clk); end while (!hs5);
        if (i == AI - 1) c_last_in_cyc[t] = cyc - 1;
      end
    c_iv <= 1'b0;
  endtask

  task automatic sink_c();
    for (int t = 0; t < NT; t++)
      for (int y = 0; y < AO; y++) begin
        do begin
          c_or <= stress ? ($urandom % 2 == 0) : 1'b1;
          @(negedge clk); hs6 = c_ov && c_or;
          @(posedge clk);
        end while (!hs6);
        if (y == 0) c_first_out_cyc[t] = cyc - 1;
        checks++;
        if (c_out !== ea[t][y]) begin
          failures++;
          $display("C t=%0d y=%0d got %h exp %h", t, y, c_out, ea[t][y]);
        end
      end
    c_or <= 1'b0;
  endtask

  task automatic drive_b();
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < BI; i++) begin
        b_iv <= 1'b1; b_in <= xb[t][i];
        if (stress && ($urandom % 3 == 0)) begin
          b_iv <= 1'b0; @(posedge clk); b_iv <= 1'b1;
        end
        do begin @(negedge clk); hs2 = b_ir; @(posedge clk); end while (!hs2);
        if (t == 0 && i == 0) b_first_in = cyc - 1;
        if (t == NT - 1 && i == BI - 1) b_last_in = cyc - 1;
      end
    b_iv <= 1'b0;
  endtask

  task automatic sink_a();
    for (int t = 0; t < NT; t++)
      for (int y = 0; y < AO; y++) begin
        do begin
          a_or <= stress ? ($urandom % 2 == 0) : 1'b1;
          @(negedge clk); hs3 = a_ov && a_or;
          @(posedge clk);
        end while (!hs3);
        if (y == 0) a_first_out_cyc[t] = cyc - 1;
        checks++;
        if (a_out !== ea[t][y]) begin
          failures++;
          $display("A t=%0d y=%0d got %h exp %h", t, y, a_out, ea[t][y]);
        end
      end
    a_or <= 1'b0;
  endtask

  task automatic sink_b();
    for (int t = 0; t < NT; t++)
      for (int y = 0; y < BO; y++) begin
        do begin
          b_or <= stress ? ($urandom % 2 == 0) : 1'b1;
          @(negedge clk); hs4 = b_ov && b_or;
          @(posedge clk);
        end while (!hs4);
        checks++;
        if (b_out !== eb[t][y]) begin
          failures++;
          $display("B t=%0d y=%0d got %h exp %h", t, y, b_out, eb[t][y]);
        end
      end
    b_or <= 1'b0;
  endtask

  task automatic load_weights();
    for (int y = 0; y < AO; y++) for (int i = 0; i < AI; i++) begin
      a_we <= 1; a_wa <= $bits(a_wa)'(y * AI + i); a_wd <= wa[y][i]; @(posedge clk);
    end
    for (int y = 0; y < AO; y++) begin
      a_we <= 1; a_wa <= $bits(a_wa)'(AO * AI + y); a_wd <= ba[y]; @(posedge clk);
    end
    a_we <= 0;
    for (int y = 0; y < BO; y++) for (int i = 0; i < BI; i++) begin
      b_we <= 1; b_wa <= $bits(b_wa)'(y * BI + i); b_wd <= wb[y][i]; @(posedge clk);
    end
    for (int y = 0; y < BO; y++) begin
      b_we <= 1; b_wa <= $bits(b_wa)'(BO * BI + y); b_wd <= bb[y]; @(posedge clk);
    end
    b_we <= 0;
  endtask

  task automatic randomize_data(input int pass);
    for (int y = 0; y < AO; y++) begin
      ba[y] = rnd_q(26);
      for (int i = 0; i < AI; i++) wa[y][i] = rnd_q(26);
    end
    for (int y = 0; y < BO; y++) begin
      bb[y] = rnd_q(26);
      for (int i = 0; i < BI; i++) wb[y][i] = rnd_q(26);
    end
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < AI; i++) xa[t][i] = rnd_q(28);
      for (int i = 0; i < BI; i++) xb[t][i] = rnd_q(28);
    end
    // One pass drives large values so that saturation is exercised.
    if (pass == 1) begin
      for (int i = 0; i < AI; i++) begin xa[0][i] = 32'sh7f000000; wa[0][i] = 32'sh7f000000; end
      for (int i = 0; i < AI; i++) begin xa[0][i] = 32'sh7f000000; wa[1][i] = 32'sh81000000; end
    end
  endtask

  initial begin
    a_iv = 0; a_or = 0; a_we = 0; a_in = '0; a_wa = '0; a_wd = '0;
    c_iv = 0; c_or = 0; c_in = '0;
    b_iv = 0; b_or = 0; b_we = 0; b_in = '0; b_wa = '0; b_wd = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 3; pass++) begin
      stress = (pass == 2);
      randomize_data(pass);
      compute_expected();
      load_weights();
      @(posedge clk);
      fork
        drive_a(); sink_a(); drive_b(); sink_b(); drive_c(); sink_c();
      join
      if (!stress) begin
        // latency: first result two cycles after the last activation
        for (int t = 0; t < NT; t++) begin
          checks++;
          if (a_first_out_cyc[t] - a_last_in_cyc[t] != 2) begin
            failures++;
            $display("latency t=%0d: %0d cycles", t, a_first_out_cyc[t] - a_last_in_cyc[t]);
          end
        end
        // tiled layer: the last activation is issued for CT tiles, so the
        // first result comes CT - 1 cycles later than in the unrolled one
        for (int t = 0; t < NT; t++) begin
          checks++;
          if (c_first_out_cyc[t] - c_last_in_cyc[t] != CT + 1) begin
            failures++;
            $display("tiled latency t=%0d: %0d cycles", t, c_first_out_cyc[t] - c_last_in_cyc[t]);
          end
        end
        // rate: the 32->8 layer takes one activation per clock
        checks++;
        if (b_last_in - b_first_in != NT * BI - 1) begin
          failures++;
          $display("rate: %0d cycles for %0d inputs", b_last_in - b_first_in + 1, NT * BI);
        end
      end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
