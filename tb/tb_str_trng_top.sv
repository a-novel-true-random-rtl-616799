// End-to-end testbench of str_trng_top with every parameter at its default:
// the 511-stage ring with 256 events, sampled at 16 MHz, filter order 8.
//
// The run goes through reset, raw mode, a switch to filtered mode, and a
// switch back, and checks:
//   - the ring oscillates at a steady period near 2.46 ns (from str_out),
//     with a period jitter of a few picoseconds;
//   - each raw bit is the XOR of all 511 ring outputs as they were at the
//     clock edge two cycles earlier, one raw bit per clock;
//   - raw mode: each output bit is the raw bit of the clock before;
//   - filtered mode: one output per 8 raw bits, equal to their XOR;
//   - the raw stream holds both values (the sampling is not stuck).
// Every mechanism (ring oscillation, raw output, filtered output, mode
// switch) is counted, and one that never happened is a failure.
`timescale 1ps / 1fs
module tb_str_trng_top;

  localparam int unsigned ORDER = str_trng_pkg::FILTER_ORDER;
  localparam realtime     TCLK  = 62500.0;   // 16 MHz

  logic clk = 1'b0, rst_n, filter_en;
  logic rnd_bit, rnd_valid, raw_bit, raw_valid, str_out;
  int checks = 0, failures = 0;

  str_trng_top dut (
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
    #(TCLK * 400);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ring period from str_out
  realtime last_rise = 0.0;
  real     psum = 0.0, psum2 = 0.0, pmin = 1.0e9, pmax = 0.0;
  int      n_per = 0;
  always @(posedge str_out) if (rst_n) begin
    if (last_rise > 0.0 && $realtime > 4.0 * TCLK) begin
      psum += $realtime - last_rise;
      psum2 += ($realtime - last_rise) * ($realtime - last_rise);
      if ($realtime - last_rise < pmin) pmin = $realtime - last_rise;
      if ($realtime - last_rise > pmax) pmax = $realtime - last_rise;
      n_per++;
    end
    last_rise = $realtime;
  end

  // independent reference of the raw stream: XOR of every stage output at
  // the sampling edge, delayed two clocks
  logic par_q[2];
  always @(posedge clk) begin
    logic p;
    p = 1'b0;
    for (int i = 0; i < str_trng_pkg::STR_STAGES; i++) p ^= dut.phase[i];
    par_q[1] <= par_q[0];
    par_q[0] <= p;
  end

  // mechanism counters and stream checks
  int   n_raw = 0, n_raw_out = 0, n_filt_out = 0, n_switch = 0, ones = 0;
  int   grp_cnt = 0;
  logic grp_acc = 1'b0;
  logic prev_raw, prev_raw_valid = 1'b0, mode_q = 1'b0, mode_seen = 1'b0;
  int   since_out = 0;

  always @(posedge clk) if (rst_n) begin
    #1000;
    if (raw_valid) begin
      n_raw++;
      if (raw_bit) ones++;
      check(raw_bit == par_q[1], "raw bit is the XOR of the sampled ring outputs");
    end
    // filter_en as the filter saw it at this edge
    if (mode_seen && filter_en != mode_q) begin
      n_switch++;
      grp_cnt = 0;
      grp_acc = 1'b0;
      check(rnd_valid == 1'b0, "no output on a mode switch");
    end else if (!filter_en) begin
      check(rnd_valid == prev_raw_valid, "raw mode: one output per raw bit");
      if (rnd_valid) begin
        check(rnd_bit == prev_raw, "raw mode: output is the previous raw bit");
        n_raw_out++;
      end
    end else if (prev_raw_valid) begin
      if (grp_cnt == ORDER - 1) begin
        check(rnd_valid == 1'b1, "filtered mode: output after 8 raw bits");
        check(rnd_bit == (grp_acc ^ prev_raw), "filtered mode: output is the XOR of 8 raw bits");
        n_filt_out++;
        grp_cnt = 0;
        grp_acc = 1'b0;
      end else begin
        check(rnd_valid == 1'b0, "filtered mode: no output inside a group");
        grp_cnt++;
        grp_acc ^= prev_raw;
      end
    end
    mode_q         = filter_en;
    mode_seen      = 1'b1;
    prev_raw       = raw_bit;
    prev_raw_valid = raw_valid;
  end

  initial begin
    rst_n = 1'b0;
    filter_en = 1'b0;
    repeat (4) @(posedge clk);
    #(TCLK / 4);
    rst_n = 1'b1;
    // raw mode
    repeat (20) @(posedge clk);
    #(TCLK / 4);
    filter_en = 1'b1;
    // filtered mode: 10 groups of 8 raw bits
    repeat (84) @(posedge clk);
    #(TCLK / 4);
    filter_en = 1'b0;
    repeat (6) @(posedge clk);
    #(TCLK / 4);

    $display("ring: %0d periods, mean %f ps, min %f ps, max %f ps, period jitter %f ps rms",
             n_per, psum / real'(n_per), pmin, pmax,
             $sqrt(psum2 / real'(n_per) - (psum / real'(n_per)) ** 2));
    $display("raw bits %0d (ones %0d), raw outputs %0d, filtered outputs %0d, mode switches %0d",
             n_raw, ones, n_raw_out, n_filt_out, n_switch);
    check(n_per > 500, "mechanism: ring oscillation");
    check(psum / real'(n_per) > 2400.0 && psum / real'(n_per) < 2520.0,
          "ring period near 2.46 ns");
    check(pmax - pmin < 50.0, "ring period steady");
    check($sqrt(psum2 / real'(n_per) - (psum / real'(n_per)) ** 2) > 1.0 &&
          $sqrt(psum2 / real'(n_per) - (psum / real'(n_per)) ** 2) < 10.0,
          "period jitter of a few picoseconds, as measured on the 511-stage ring");
    check(n_raw_out > 20, "mechanism: raw output");
    check(n_filt_out >= 9, "mechanism: filtered output, one per 8 raw bits");
    check(n_switch >= 2, "mechanism: mode switch");
    check(ones > 0 && ones < n_raw, "raw stream holds both values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
