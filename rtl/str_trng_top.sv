// True random number generator built on a self-timed ring (STR).
//
// Structure: an L-stage self-timed ring holding N events provides L phases of
// one oscillation, T/(2L) apart (about 2.4 ps for the default 511-stage ring
// at T = 2.46 ns). str_sampler samples every phase with the system clock and
// XORs the samples into one raw bit per clock; because the phase grid is as
// fine as the ring's jitter, where the sampling instant falls relative to the
// nearest transition is random. parity_filter optionally XORs ORDER successive
// raw bits to remove the bias left when the grid is coarser than the jitter.
// The architecture and the defaults (L = 511, N = 256, filter order 8, a
// 16 MHz sampling clock) follow the document; the stage timing constants and
// the register and handshake details are this design's own.
//
// Interface:
//   clk        sampling clock (16 MHz in the reference setup), rst_n active
//              low, synchronous for the digital part, also holds the ring in
//              its initial state
//   filter_en  1: output compressed bits (one per ORDER clocks),
//              0: output raw bits (one per clock)
//   rnd_bit / rnd_valid   the generator output
//   raw_bit / raw_valid   the unfiltered stream, for test
//   str_out    one ring stage output, the signal brought off chip to measure
//              the ring's period and jitter
// Timing: raw_bit is valid two clocks after the sampling edge it was taken
// on; rnd_bit one clock after the raw bit (raw mode) or after the last raw bit
// of its group (filtered mode).
//
// The ring is a behavioural model (str_stage); the sampler and the filter are
// synthesizable.
`timescale 1ps / 1fs
module str_trng_top #(
  parameter int unsigned L            = str_trng_pkg::STR_STAGES,
  parameter int unsigned N            = str_trng_pkg::STR_EVENTS,
  parameter int unsigned FILTER_ORDER = str_trng_pkg::FILTER_ORDER,
  parameter real         DELAY_PS     = str_trng_pkg::STAGE_DELAY_PS,
  parameter real         CHARLIE_PS   = str_trng_pkg::STAGE_CHARLIE_PS,
  parameter real         JITTER_PS    = str_trng_pkg::STAGE_JITTER_PS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic filter_en,
  output logic rnd_bit,
  output logic rnd_valid,
  output logic raw_bit,
  output logic raw_valid,
  output logic str_out
);

  logic [L-1:0] phase;

  self_timed_ring #(
    .L         (L),
    .N         (N),
    .DELAY_PS  (DELAY_PS),
    .CHARLIE_PS(CHARLIE_PS),
    .JITTER_PS (JITTER_PS)
  ) u_ring (
    .rst_n(rst_n),
    .c    (phase)
  );

  str_sampler #(
    .L(L)
  ) u_sampler (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .raw_bit  (raw_bit),
    .raw_valid(raw_valid)
  );

  parity_filter #(
    .ORDER(FILTER_ORDER)
  ) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (filter_en),
    .in_bit   (raw_bit),
    .in_valid (raw_valid),
    .out_bit  (rnd_bit),
    .out_valid(rnd_valid)
  );

  assign str_out = phase[0];

endmodule
