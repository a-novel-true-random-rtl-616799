// Shows that the generator's output comes from the ring's jitter and from
// nothing else. Four generators with the 127-stage, 64-event ring run side by
// side from the same reset and clock: two with jitter-free stages, two with
// the default 1.9 ps jitter. The jitter-free pair must produce identical raw
// streams (the circuit alone is deterministic); the jittered pair must
// disagree on a good share of its bits, since each of them draws its own
// noise.
`timescale 1ps / 1fs
module tb_jitter_source;

  localparam realtime TCLK  = 62500.0;   // 16 MHz
  localparam int      NBITS = 120;

  logic clk = 1'b0, rst_n;
  logic [3:0] raw, raw_v, rnd, rnd_v, so;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 4; g++) begin : g_gen
    str_trng_top #(.L(127), .N(64), .JITTER_PS(g < 2 ? 0.0 : 1.9)) u (
      .clk(clk), .rst_n(rst_n), .filter_en(1'b0),
      .rnd_bit(rnd[g]), .rnd_valid(rnd_v[g]),
      .raw_bit(raw[g]), .raw_valid(raw_v[g]), .str_out(so[g]));
  end

  always #(TCLK / 2) clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin : watchdog
    #(TCLK * (NBITS + 50));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, same_quiet = 0, same_noisy = 0, ones_quiet = 0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    #(TCLK / 4);
    rst_n = 1'b1;
    while (n < NBITS) begin
      @(posedge clk);
      #1000;
      if (raw_v == 4'b1111) begin
        n++;
        if (raw[0] == raw[1]) same_quiet++;
        if (raw[2] == raw[3]) same_noisy++;
        if (raw[0]) ones_quiet++;
      end
    end
    $display("jitter-free pair: %0d of %0d bits equal; jittered pair: %0d of %0d equal",
             same_quiet, n, same_noisy, n);
    check(same_quiet == n, "jitter-free generators are deterministic");
    check(ones_quiet > 0 && ones_quiet < n, "jitter-free stream is not constant");
    check(same_noisy < (n * 8) / 10, "jittered generators disagree on more than 20 % of bits");
    check(same_noisy > n / 5, "jittered generators still agree on a share of bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
