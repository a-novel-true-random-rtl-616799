// Testbench of str_stage, the behavioural ring stage.
//
// Drives the forward input f and reverse input r of one stage directly,
// with the jitter switched off, and checks:
//   - the reset value;
//   - the C-element function: the output copies f only when f differs from
//     the output and r equals it, and holds in every other input state;
//   - the Charlie-effect delay: after the enabling input, the output
//     switches at (tf + tr)/2 + D + sqrt(C^2 + ((tf - tr)/2)^2), computed
//     here from the input times, for input separations from 0 to far apart;
//   - with jitter on, that the delay spread has about the set deviation.
`timescale 1ps / 1fs
module tb_str_stage;

  localparam real D = 450.0;
  localparam real C = 165.0;

  logic rst_n, f, r;
  logic c, cj, c_hold;
  int   checks = 0, failures = 0;
  realtime tf, tr;

  str_stage #(.INIT(1'b0), .DELAY_PS(D), .CHARLIE_PS(C), .JITTER_PS(0.0)) dut (
    .rst_n(rst_n), .f(f), .r(r), .c(c));

  // second instance with jitter, for the spread check
  logic fj, rj;
  str_stage #(.INIT(1'b0), .DELAY_PS(D), .CHARLIE_PS(C), .JITTER_PS(2.0)) dut_j (
    .rst_n(rst_n), .f(fj), .r(rj), .c(cj));

  function automatic real expected_delay(realtime a, realtime b, realtime now);
    real s;
    s = (a - b) / 2.0;
    return (a + b) / 2.0 + D + $sqrt(C * C + s * s) - now;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Wait for the output to switch; returns its delay from now, or -1.
  real sw_dly;
  task automatic wait_switch();
    realtime t0;
    t0 = $realtime;
    sw_dly = -1.0;
    fork
      begin : w
        @(c);
        sw_dly = $realtime - t0;
      end
      begin : to
        #5000;
      end
    join_any
    disable fork;
  endtask

  // Enable the stage by changing f at now, r having changed `sep` ps before.
  task automatic enable_by_f(logic nf, real sep, string what);
    real dly, exp_d;
    logic c_prev;
    f  = c;           // no event waiting yet
    r  = ~c;
    #1000;
    r  = c;           // bubble: r now equals the output
    tr = $realtime;
    #(sep);
    c_prev = c;
    check(c == c_prev, {what, ": holds while r alone changes"});
    f  = nf;
    tf = $realtime;
    exp_d = expected_delay(tf, tr, $realtime);
    wait_switch(); dly = sw_dly;
    check(dly > 0.0 && (dly - exp_d) < 0.01 && (exp_d - dly) < 0.01,
          $sformatf("%s: delay %f expected %f", what, dly, exp_d));
    check(c == nf, {what, ": output copies f"});
    #1000;
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dly;
    real sum, sum2, m, sd;
    rst_n = 1'b0; f = 1'b1; r = 1'b1; fj = 1'b0; rj = 1'b0;
    #1000;
    check(c == 1'b0, "reset value");
    f = 1'b0; #10;
    check(c == 1'b0, "held in reset while enabled");
    f = 1'b0; r = 1'b0;
    #1000;
    rst_n = 1'b1;
    #2000;
    check(c == 1'b0, "no switch when f equals the output");

    // r differs from the output: f changing must not fire the stage
    r = 1'b1; #500; f = 1'b1;
    wait_switch(); dly = sw_dly;
    check(dly < 0.0, "holds when r differs from the output (no bubble)");
    f = 1'b0; r = 1'b0; #2000;
    check(c == 1'b0, "still holding");

    // the Charlie effect for several separations between r and f
    enable_by_f(1'b1, 0.0,    "simultaneous inputs");
    enable_by_f(1'b0, 100.0,  "inputs 100 ps apart");
    enable_by_f(1'b1, 330.0,  "inputs 330 ps apart");
    enable_by_f(1'b0, 2000.0, "inputs far apart");

    // a far-apart pair must be faster than a simultaneous one (Charlie)
    check(expected_delay(0.0, 0.0, 0.0) > expected_delay(2000.0, 0.0, 2000.0),
          "Charlie: closer inputs give a longer delay");

    // enable by r arriving after f: f set first while r differs
    r = ~c; #300; f = ~c; tf = $realtime; #200; r = c; tr = $realtime;
    wait_switch(); dly = sw_dly;
    check(dly > 0.0 && (dly - expected_delay(tf, tr, tr)) < 0.01 &&
          (expected_delay(tf, tr, tr) - dly) < 0.01, "enabled by the reverse input");

    // jitter: the spread of many simultaneous-input delays
    sum = 0.0; sum2 = 0.0;
    rj = 1'b1; fj = 1'b0;
    #1000;
    for (int k = 0; k < 400; k++) begin
      realtime t0;
      rj = cj; fj = ~cj; t0 = $realtime;
      @(cj);
      dly = $realtime - t0;
      sum += dly; sum2 += dly * dly;
      #1000;
    end
    m  = sum / 400.0;
    sd = $sqrt(sum2 / 400.0 - m * m);
    $display("jitter: mean %f ps sd %f ps", m, sd);
    check(m > D + C - 0.5 && m < D + C + 0.5, "jittered mean delay");
    check(sd > 1.6 && sd < 2.4, "jittered delay deviation");

    // reset during operation returns the output to INIT
    f = ~c; r = c;   // enable
    c_hold = c;
    #100; rst_n = 1'b0; #1;
    check(c == c_hold, "reset: a started transition is not cut short");
    #1000;
    check(c == 1'b0, "reset value reached within one stage delay");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
