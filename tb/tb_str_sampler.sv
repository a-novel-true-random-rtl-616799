// Testbench of str_sampler at its default width (511 phases).
//
// Drives random phase vectors, changed between clock edges, and checks that
// raw_bit equals the XOR of the vector present at the clock edge two cycles
// earlier (the sampling flip-flops, then the XOR register), that raw_valid
// rises exactly two clocks after reset and then stays high (one raw bit per
// clock), and that reset clears the output.
`timescale 1ps / 1fs
module tb_str_sampler;

  localparam int unsigned L = str_trng_pkg::STR_STAGES;

  logic         clk = 1'b0, rst_n;
  logic [L-1:0] phase;
  logic         raw_bit, raw_valid;
  int checks = 0, failures = 0;

  str_sampler #(.L(L)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .raw_bit(raw_bit), .raw_valid(raw_valid));

  always #31250 clk = ~clk;   // 16 MHz

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic logic [L-1:0] rand_phase();
    logic [L-1:0] v;
    for (int i = 0; i < L; i += 32) v[i +: 32] = L'($urandom);
    return v;
  endfunction

  function automatic logic parity(logic [L-1:0] v);
    logic p = 1'b0;
    for (int i = 0; i < L; i++) p = p ^ v[i];
    return p;
  endfunction

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic expq[$];
  int   cyc;
  int   ones;

  initial begin
    rst_n = 1'b0;
    phase = rand_phase();
    repeat (3) @(posedge clk);
    #1000;
    check(raw_valid == 1'b0 && raw_bit == 1'b0, "reset clears the outputs");
    rst_n = 1'b1;
    cyc  = 0;
    ones = 0;
    repeat (300) begin
      @(posedge clk);
      // value sampled at this edge
      expq.push_back(parity(phase));
      cyc++;
      #1000;
      check(raw_valid == (cyc >= 2), $sformatf("raw_valid after %0d clocks", cyc));
      if (cyc >= 2) begin
        logic e;
        e = expq.pop_front();
        check(raw_bit == e, "raw_bit is the XOR of the phases sampled two clocks before");
        if (raw_bit) ones++;
      end
      // change the phases away from the edge
      #($urandom_range(1000, 50000));
      phase = rand_phase();
    end
    check(ones > 100 && ones < 200, "raw bits follow the inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
