// Testbench of self_timed_ring, run with the 63-stage, 32-event ring of the
// measurement table (the smallest one, to keep the simulation short).
//
// Checks:
//   - after reset the ring holds exactly N tokens (a stage holds a token when
//     its output differs from the next stage's), spread at most
//     ceil(L/N) stages apart;
//   - the number of tokens is conserved while the ring runs;
//   - every stage oscillates, all with the same period, and the period is
//     steady (its spread is a few times the jitter, not more);
//   - the evenly-spaced mode, on a second, jitter-free ring: once settled,
//     the 2L transitions of one period, taken over all stages, are T/(2L)
//     apart to within 10 %. This is the phase resolution the TRNG relies on.
//     (With jitter the grid is as even only on average; the jittered ring
//     is checked for conservation and a steady period.)
`timescale 1ps / 1fs
module tb_self_timed_ring;

  localparam int unsigned L = 63;
  localparam int unsigned N = 32;

  logic         rst_n;
  logic [L-1:0] c;
  int checks = 0, failures = 0;

  logic [L-1:0] c0;

  self_timed_ring #(.L(L), .N(N)) dut (.rst_n(rst_n), .c(c));
  self_timed_ring #(.L(L), .N(N), .JITTER_PS(0.0)) dut0 (.rst_n(rst_n), .c(c0));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic int count_tokens(logic [L-1:0] v);
    int n = 0;
    for (int i = 0; i < L; i++) if (v[i] != v[(i + 1) % L]) n++;
    return n;
  endfunction

  function automatic int max_token_gap(logic [L-1:0] v);
    int first = -1, last = -1, gap = 0;
    for (int i = 0; i < L; i++)
      if (v[i] != v[(i + 1) % L]) begin
        if (first < 0) first = i;
        else if (i - last > gap) gap = i - last;
        last = i;
      end
    if (first + L - last > gap) gap = first + L - last;
    return gap;
  endfunction

  // transition log of all stages inside a window
  bit      logging = 1'b0;
  realtime ev[$];
  int      edges[L];
  for (genvar i = 0; i < L; i++) begin : g_mon
    always @(c[i]) if (rst_n) edges[i]++;
    always @(c0[i]) if (logging) ev.push_back($realtime);
  end

  // period of stage 0 from its rising edges
  realtime last_rise = 0.0, periods[$];
  always @(posedge c[0]) if (rst_n) begin
    if (last_rise > 0.0) periods.push_back($realtime - last_rise);
    last_rise = $realtime;
  end

  initial begin : watchdog
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real     sum, sum2, tmean, tsd, res, gap, gmin, gmax;
    realtime w0;
    int      bad_tokens, emin, emax;
    rst_n = 1'b0;
    #5000;
    check(count_tokens(c) == N, $sformatf("tokens after reset: %0d", count_tokens(c)));
    check(max_token_gap(c) <= (L + N - 1) / N, "tokens spread evenly at reset");
    foreach (edges[i]) edges[i] = 0;
    rst_n = 1'b1;

    // run, checking token conservation at pseudo-random instants
    bad_tokens = 0;
    for (int k = 0; k < 400; k++) begin
      #(100 + $urandom_range(0, 137));
      if (count_tokens(c) != N) bad_tokens++;
    end
    check(bad_tokens == 0, $sformatf("token count conserved (%0d bad samples)", bad_tokens));

    // period of stage 0, skipping the first periods (settling)
    sum = 0.0; sum2 = 0.0;
    for (int k = 10; k < periods.size(); k++) begin
      sum += periods[k]; sum2 += periods[k] * periods[k];
    end
    tmean = sum / real'(periods.size() - 10);
    tsd   = $sqrt(sum2 / real'(periods.size() - 10) - tmean * tmean);
    res   = tmean / real'(2 * L);
    $display("period %f ps, deviation %f ps, phase resolution %f ps over %0d periods",
             tmean, tsd, res, periods.size() - 10);
    check(periods.size() > 20, "ring oscillates");
    check(tmean > 1500.0 && tmean < 3000.0, "period in the nanosecond range of the measurements");
    check(tsd < 10.0, "period steady (evenly-spaced mode)");

    // all stages switch equally often
    emin = edges[0]; emax = edges[0];
    foreach (edges[i]) begin
      if (edges[i] < emin) emin = edges[i];
      if (edges[i] > emax) emax = edges[i];
    end
    check(emax - emin <= 2, $sformatf("all stages at one frequency (%0d..%0d edges)", emin, emax));

    // phase grid of the jitter-free ring, after it has settled
    check(count_tokens(c0) == N, "jitter-free ring holds N tokens");
    #(900_000 - $realtime);
    ev.delete();
    w0 = $realtime;
    logging = 1'b1;
    #(tmean);
    logging = 1'b0;
    ev.sort();
    check(ev.size() >= 2 * L - 1 && ev.size() <= 2 * L + 1,
          $sformatf("%0d transitions in one period, expected 2L = %0d", ev.size(), 2 * L));
    gmin = 1.0e9; gmax = 0.0;
    for (int k = 1; k < ev.size(); k++) begin
      gap = ev[k] - ev[k - 1];
      if (gap < gmin) gmin = gap;
      if (gap > gmax) gmax = gap;
    end
    $display("transition spacing %f .. %f ps, expected %f ps", gmin, gmax, res);
    check(gmin > 0.9 * res, "no two phases closer than 0.9 x resolution");
    check(gmax < 1.1 * res, "no gap in the phase grid wider than 1.1 x resolution");
    check(w0 > 0.0, "window taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
