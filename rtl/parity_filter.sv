// Parity filter: bias correction by compressing ORDER successive raw bits
// into their XOR. If the raw bits are independent with bias b each, the XOR
// of n of them has bias 2^(n-1) * b^n, so a few bits of moderate entropy give
// one bit close to full entropy, at 1/n of the raw throughput.
//
// Operation: with enable high, every valid input bit is XORed into an
// accumulator; on the ORDER-th one the result is output with out_valid high
// for one cycle and the accumulator restarts. With enable low the filter is
// bypassed and each valid input bit is passed on, registered, one cycle
// later. Changing enable restarts the accumulation, so no output mixes the
// two modes. Output latency is one clock after the last bit of a group.
// rst_n is synchronous and active low.
//
// The document gives the function (XOR of n successive bits, throughput
// divided by n) and the order 8 used in its evaluation; the accumulator and
// counter structure, the bypass and the handshake are this design's choice.
`timescale 1ps / 1fs
module parity_filter #(
  parameter int unsigned ORDER = str_trng_pkg::FILTER_ORDER
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,     // 1: compress by ORDER, 0: pass raw bits
  input  logic in_bit,
  input  logic in_valid,
  output logic out_bit,
  output logic out_valid
);

  localparam int unsigned CW = (ORDER > 1) ? $clog2(ORDER) : 1;

  logic [CW-1:0] count_q;
  logic          acc_q;
  logic          enable_q;

  initial begin
    assert (ORDER >= 1) else $error("parity_filter: ORDER must be at least 1");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count_q   <= '0;
      acc_q     <= 1'b0;
      enable_q  <= 1'b0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      enable_q  <= enable;
      out_valid <= 1'b0;
      if (enable != enable_q) begin
        // mode switch: drop any partial group
        count_q <= '0;
        acc_q   <= 1'b0;
      end else if (in_valid) begin
        if (!enable) begin
          out_bit   <= in_bit;
          out_valid <= 1'b1;
        end else if (count_q == CW'(ORDER - 1)) begin
          out_bit   <= acc_q ^ in_bit;
          out_valid <= 1'b1;
          count_q   <= '0;
          acc_q     <= 1'b0;
        end else begin
          count_q   <= count_q + 1'b1;
          acc_q     <= acc_q ^ in_bit;
        end
      end
    end
  end

endmodule
