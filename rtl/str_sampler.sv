// Sampling stage of the TRNG: one D flip-flop per ring stage, all clocked by
// the system clock, followed by an XOR of all sampled values.
//
// Every transition of any ring output toggles the XOR of the L outputs, so
// that XOR is a signal whose transitions are T/(2L) apart, close to the
// jitter of the ring. Sampling it at an arbitrary instant gives a bit whose
// value depends on where the jitter put the nearest transition: the raw
// random bit. Sampling each phase with its own flip-flop before the XOR (as
// the document's architecture does) keeps the XOR tree out of the sampling
// instant.
//
// Timing: phase[] is sampled on a rising clk edge; the XOR of those samples
// is registered on the next edge, so raw_bit follows the sampling instant by
// one clock (two-cycle latency from the phase inputs) and a new raw bit is
// produced every clock cycle. raw_valid rises once both registers hold data
// taken after reset. The XOR is one combinational tree between the two
// registers; the register after it is this design's choice. rst_n is
// synchronous and active low.
`timescale 1ps / 1fs
module str_sampler #(
  parameter int unsigned L = str_trng_pkg::STR_STAGES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] phase,      // ring stage outputs, asynchronous
  output logic         raw_bit,    // XOR of the sampled phases
  output logic         raw_valid   // one raw bit per clock once high
);

  logic [L-1:0] sample_q;
  logic [1:0]   fill_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample_q  <= '0;
      raw_bit   <= 1'b0;
      fill_q    <= '0;
    end else begin
      sample_q  <= phase;
      raw_bit   <= ^sample_q;
      fill_q    <= {fill_q[0], 1'b1};
    end
  end

  assign raw_valid = fill_q[1];

endmodule
