// Statistical run of the whole generator on the ring of the evaluation
// setup: 127 stages holding 64 events, sampled at 16 MHz, filter order 8.
//
// Collects 400 raw bits (16 Mbit/s) and then 50 compressed bits (2 Mbit/s)
// and applies scaled-down forms of the FIPS 140-2 monobit, runs and
// long-run tests, with bounds at about four standard deviations of an ideal
// source of that length (the standard tests need 20000 bits, far beyond what
// an event-level simulation of the ring can produce here). It also checks
// the output rates: one raw bit per clock, one compressed bit per 8 clocks.
`timescale 1ps / 1fs
module tb_trng_statistics;

  localparam realtime TCLK  = 62500.0;   // 16 MHz
  localparam int      NRAW  = 400;
  localparam int      NFILT = 50;

  logic clk = 1'b0, rst_n, filter_en;
  logic rnd_bit, rnd_valid, raw_bit, raw_valid, str_out;
  int checks = 0, failures = 0;

  str_trng_top #(.L(127), .N(64), .FILTER_ORDER(8)) dut (
    .clk(clk), .rst_n(rst_n), .filter_en(filter_en),
    .rnd_bit(rnd_bit), .rnd_valid(rnd_valid),
    .raw_bit(raw_bit), .raw_valid(raw_valid), .str_out(str_out));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin : watchdog
    #(TCLK * (NRAW + 8 * NFILT + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ones, runs and longest run of a bit sequence
  task automatic stats(input bit s[$], output int ones, output int runs, output int longest);
    int cur = 0;
    ones = 0; runs = 0; longest = 0;
    foreach (s[k]) begin
      if (s[k]) ones++;
      if (k == 0 || s[k] != s[k - 1]) begin
        runs++;
        cur = 1;
      end else cur++;
      if (cur > longest) longest = cur;
    end
  endtask

  bit raw_s[$], filt_s[$];
  int clocks;

  initial begin
    int ones, runs, longest;
    rst_n = 1'b0;
    filter_en = 1'b0;
    repeat (4) @(posedge clk);
    #(TCLK / 4);
    rst_n = 1'b1;

    clocks = 0;
    while (raw_s.size() < NRAW) begin
      @(posedge clk);
      #1000;
      clocks++;
      if (rnd_valid) raw_s.push_back(rnd_bit);
    end
    check(clocks <= NRAW + 3, $sformatf("raw rate: %0d bits in %0d clocks", NRAW, clocks));

    filter_en = 1'b1;
    clocks = 0;
    while (filt_s.size() < NFILT) begin
      @(posedge clk);
      #1000;
      clocks++;
      if (rnd_valid) filt_s.push_back(rnd_bit);
    end
    check(clocks >= 8 * NFILT && clocks <= 8 * NFILT + 4,
          $sformatf("compressed rate: %0d bits in %0d clocks", NFILT, clocks));

    stats(raw_s, ones, runs, longest);
    $display("raw: %0d bits, %0d ones, %0d runs, longest run %0d", NRAW, ones, runs, longest);
    check(ones > 160 && ones < 240, "raw monobit");
    check(runs > 160 && runs < 240, "raw runs");
    check(longest < 20, "raw long run");

    stats(filt_s, ones, runs, longest);
    $display("compressed: %0d bits, %0d ones, %0d runs, longest run %0d", NFILT, ones, runs, longest);
    check(ones > 11 && ones < 39, "compressed monobit");
    check(runs > 11 && runs < 39, "compressed runs");
    check(longest < 14, "compressed long run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
