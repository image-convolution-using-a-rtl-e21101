// tb_lfsr_rng: checks the free-running random number source.
// A reference Galois register built from the polynomial
// x^16 + x^14 + x^13 + x^11 + 1 is stepped eight times per clock and compared
// with the block's state every clock. Over one full period the block must
// return to its seed after exactly 65535 clocks, never reach zero, and give
// every 8-bit value 256 times except 0, which appears 255 times (all nonzero
// 16-bit states are visited once).
module tb_lfsr_rng;
  logic clk = 0, rst_n = 0;
  logic [7:0]  rnd;
  logic [15:0] state;
  int checks = 0, failures = 0;
  int hist [256];
  logic [15:0] ref_s;

  lfsr_rng dut (.clk, .rst_n, .rnd, .state);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s);
    // taps 16, 14, 13, 11 of the polynomial as a right-shifting register
    logic fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ ((16'h1 << 15) | (16'h1 << 13) | (16'h1 << 12) | (16'h1 << 10));
    return s;
  endfunction

  initial begin
    int period = 0;
    int bad = 0;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ref_s = 16'hACE1;
    checks++;
    if (state !== ref_s) begin failures++; $display("seed %h", state); end
    for (int c = 1; c <= 65535; c++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) ref_s = step(ref_s);
      if (state !== ref_s || rnd !== state[7:0]) bad++;
      if (state == 16'h0) bad++;
      hist[rnd]++;
      if (period == 0 && state == 16'hACE1) period = c;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d clocks differ from reference", bad); end
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (hist[i] != ((i == 0) ? 255 : 256)) begin
        failures++; $display("value %0d seen %0d times", i, hist[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
