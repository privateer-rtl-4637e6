// tb_power_waster -- self-checking test of the power-waster toggle bank.
//
// A reference model of the LFSR (polynomial x^64 + x^63 + x^61 + x^60 + 1,
// stepped here by flipping the tap bits one by one) predicts the cell vector
// every cycle.  The test checks: nothing moves
// while enable is low; every enabled cycle matches the model; the share of
// cells switching per cycle stays near one quarter and varies from cycle to
// cycle; the sequence does not repeat within the run; waste_out is the
// parity of the cells.
module tb_power_waster;
  localparam int CELLS = 256;
  localparam logic [63:0] SEED = 64'hACE1_2468_1357_BDF9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable, waste_out;
  logic [CELLS-1:0] cells;
  power_waster #(.CELLS(CELLS), .SEED(SEED)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m_lfsr;
  logic [CELLS-1:0] m_cells;

  // One step of the right-shifting Galois register for the taps 64,63,61,60.
  function automatic logic [63:0] step(input logic [63:0] s);
    logic fb;
    fb = s[0];
    s = s >> 1;
    if (fb) begin
      s[63] = ~s[63]; s[62] = ~s[62]; s[60] = ~s[60]; s[59] = ~s[59];
    end
    return s;
  endfunction

  int min_t = CELLS, max_t = 0;
  longint total_t = 0;
  int en_cycles = 0;

  initial begin
    enable = 0;
    m_lfsr = SEED; m_cells = '0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      logic en;
      en = (n % 500) >= 100;         // off for 100 cycles out of every 500
      @(negedge clk);
      enable = en;
      @(posedge clk);
      #1;
      if (en) begin
        logic [CELLS-1:0] tg;
        int t;
        for (int i = 0; i < CELLS; i++) tg[i] = m_lfsr[i % 64] && !m_lfsr[(i + 1 + i / 64) % 64];
        t = $countones(tg);
        if (t < min_t) min_t = t;
        if (t > max_t) max_t = t;
        total_t += t; en_cycles++;
        m_cells = m_cells ^ tg;
        m_lfsr = step(m_lfsr);
      end
      checks += 2;
      if (cells !== m_cells) begin failures++; if (failures < 10) $display("cycle %0d cells differ", n); end
      if (waste_out !== ^m_cells) begin failures++; if (failures < 10) $display("cycle %0d parity wrong", n); end
    end
    checks += 3;
    if (total_t < en_cycles * CELLS / 5 || total_t > en_cycles * CELLS * 3 / 10) begin
      failures++; $display("mean toggles %0d", total_t / en_cycles);
    end
    if (max_t - min_t < 20) begin failures++; $display("toggle count hardly varies: %0d..%0d", min_t, max_t); end
    if (m_lfsr == SEED) begin failures++; $display("sequence repeated"); end
    $display("toggles per cycle: min %0d mean %0d max %0d", min_t, total_t / en_cycles, max_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
