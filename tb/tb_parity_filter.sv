// Testbench of parity_filter at its default order (8).
//
// A reference model XORs ORDER consecutive valid input bits. The testbench
// feeds random bits with gaps in in_valid and checks:
//   - filtered mode: every output equals the XOR of its group, one clock
//     after the group's last bit, and exactly one output per ORDER inputs
//     (the throughput divided by ORDER);
//   - bypass mode: each valid input appears one clock later;
//   - a mode switch drops the partial group and starts a fresh one;
//   - orders 3 and 38 (the other filter orders of the entropy table), fed
//     the same stream in filtered mode, against their own reference.
`timescale 1ps / 1fs
module tb_parity_filter;

  localparam int unsigned ORDER = str_trng_pkg::FILTER_ORDER;

  logic clk = 1'b0, rst_n, enable, in_bit, in_valid, out_bit, out_valid;
  int checks = 0, failures = 0;

  parity_filter #(.ORDER(ORDER)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .in_bit(in_bit), .in_valid(in_valid),
    .out_bit(out_bit), .out_valid(out_valid));

  always #5000 clk = ~clk;

  // extra orders, always filtering, checked against a local reference
  localparam int XORD[2] = '{3, 38};
  int xchecks[2], xfails[2], xouts[2];
  for (genvar g = 0; g < 2; g++) begin : g_ord
    logic ob, ov;
    int   cnt = 0;
    logic acc = 1'b0, ev = 1'b0, eb = 1'b0;
    parity_filter #(.ORDER(XORD[g])) u (
      .clk(clk), .rst_n(rst_n), .enable(1'b1), .in_bit(in_bit), .in_valid(in_valid),
      .out_bit(ob), .out_valid(ov));
    always @(posedge clk) begin
      if (!rst_n) begin
        cnt = 0; acc = 1'b0; ev = 1'b0;
      end else begin
        ev = 1'b0;
        if (in_valid) begin
          if (cnt == XORD[g] - 1) begin
            ev = 1'b1; eb = acc ^ in_bit; cnt = 0; acc = 1'b0;
          end else begin
            cnt++; acc ^= in_bit;
          end
        end
      end
      #1000;
      if (rst_n) begin
        xchecks[g]++;
        if (ov != ev || (ev && ob != eb)) xfails[g]++;
        if (ov) xouts[g]++;
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int   ref_cnt;
  logic ref_acc;
  logic exp_valid, exp_bit;
  int   n_in, n_out;

  // drive `cycles` clocks in the given mode; check every cycle
  task automatic run(logic mode, int cycles, int valid_pct);
    enable = mode;
    repeat (cycles) begin
      in_valid = ($urandom_range(0, 99) < valid_pct);
      in_bit   = $urandom_range(0, 1);
      @(posedge clk);
      // reference: what the filter must present after this edge
      exp_valid = 1'b0;
      if (in_valid) begin
        n_in++;
        if (!mode) begin
          exp_valid = 1'b1;
          exp_bit   = in_bit;
        end else if (ref_cnt == ORDER - 1) begin
          exp_valid = 1'b1;
          exp_bit   = ref_acc ^ in_bit;
          ref_cnt   = 0;
          ref_acc   = 1'b0;
        end else begin
          ref_cnt++;
          ref_acc ^= in_bit;
        end
      end
      #1000;
      check(out_valid == exp_valid, "out_valid");
      if (exp_valid) begin
        check(out_bit == exp_bit, "out_bit");
        n_out++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; in_bit = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1000;
    check(out_valid == 1'b0, "reset");
    rst_n = 1'b1;
    @(posedge clk);    // the filter registers the mode once after reset
    #1000;

    // bypass
    ref_cnt = 0; ref_acc = 1'b0; n_in = 0; n_out = 0;
    run(1'b0, 200, 80);
    check(n_out == n_in && n_in > 0, "bypass passes every bit");

    // switch on: one idle clock drops any partial group
    enable = 1'b1; in_valid = 1'b0;
    @(posedge clk); #1000;
    ref_cnt = 0; ref_acc = 1'b0; n_in = 0; n_out = 0;
    run(1'b1, 2000, 100);
    check(n_out == n_in / ORDER, $sformatf("filtered: %0d outputs for %0d inputs", n_out, n_in));
    run(1'b1, 2000, 60);

    // switch off in the middle of a group, then on again mid-group
    run(1'b1, 3, 100);
    enable = 1'b0; in_valid = 1'b1; in_bit = 1'b1;
    @(posedge clk); #1000;
    check(out_valid == 1'b0, "switching cycle emits nothing");
    run(1'b0, 20, 100);
    enable = 1'b1; in_valid = 1'b1;
    @(posedge clk); #1000;
    check(out_valid == 1'b0, "switching back emits nothing");
    ref_cnt = 0; ref_acc = 1'b0;
    run(1'b1, 500, 90);

    for (int g = 0; g < 2; g++) begin
      $display("order %0d: %0d outputs, %0d mismatches", XORD[g], xouts[g], xfails[g]);
      check(xfails[g] == 0 && xouts[g] > 0, $sformatf("order %0d filter", XORD[g]));
      checks += xchecks[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
