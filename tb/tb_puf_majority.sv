// tb_puf_majority -- self-checking test of PUF majority voting.
//
// A behavioural PUF model answers the voter's requests with noisy raw
// responses.  For 20 challenges (some repeated) the test checks that the PUF
// was asked exactly VOTES times, that the voted response equals the per-bit
// majority of the raw responses actually given, that it equals the model's
// noise-free preference on every stable cell, and that the whole request
// takes the expected number of cycles.  It also counts how many raw bits
// the vote corrected (must be more than zero).
module tb_puf_majority;
  localparam int RW = 256, CW = 32, VOTES = 5, LAT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, resp_valid, puf_req, puf_ack;
  logic [CW-1:0] challenge, puf_challenge;
  logic [RW-1:0] response, puf_resp;

  puf_majority #(.RESP_W(RW), .CHAL_W(CW), .VOTES(VOTES)) dut (.*);
  puf_cell_model #(.RESP_W(RW), .CHAL_W(CW), .LAT(LAT)) u_puf (
    .clk, .req(puf_req), .challenge(puf_challenge), .ack(puf_ack), .resp(puf_resp));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fixed = 0, stable_mismatch = 0;

  initial begin
    start = 0; challenge = '0;
    repeat (6) @(posedge clk); rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      int h0, cycles;
      logic [CW-1:0] ch;
      logic [RW-1:0] maj;
      ch = (n % 4 == 3) ? 32'h1234 : 32'($urandom);
      h0 = u_puf.history.size();
      challenge <= ch; start <= 1;
      @(posedge clk);
      start <= 0;
      cycles = 0;
      while (!resp_valid) begin @(posedge clk); cycles++; end
      checks++;
      if (u_puf.history.size() - h0 != VOTES) begin
        failures++; $display("asked %0d times", u_puf.history.size() - h0);
      end
      for (int b = 0; b < RW; b++) begin
        int ones;
        ones = 0;
        for (int r = h0; r < u_puf.history.size(); r++) ones += u_puf.history[r][b];
        maj[b] = (ones > VOTES / 2);
        if (ones != 0 && ones != VOTES) fixed++;
        if (!u_puf.unstable(ch, b) && maj[b] != u_puf.preferred(ch, b)) stable_mismatch++;
      end
      checks++;
      if (response !== maj) begin failures++; $display("challenge %h: response is not the majority (%0d bits)", ch, $countones(response ^ maj)); end
      // each round: request seen, LAT cycles to ack, one idle cycle, one
      // cycle for the model to see the new request
      checks++;
      if (cycles != VOTES * (LAT + 2)) begin
        failures++; $display("request took %0d cycles", cycles);
      end
      repeat ($urandom % 4) @(posedge clk);
    end
    checks++;
    if (fixed == 0) begin failures++; $display("voting never had to correct a bit"); end
    checks++;
    if (stable_mismatch > 2) begin failures++; $display("%0d stable bits voted wrong", stable_mismatch); end
    $display("raw bits corrected by voting: %0d; stable bits still wrong: %0d", fixed, stable_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
