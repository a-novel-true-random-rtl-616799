// Self-timed ring (STR): an asynchronous micropipeline of L stages closed into
// a ring. Behavioural model built from str_stage models.
//
// Stage i takes its forward input from stage i-1 and its reverse input from
// stage i+1 (indices modulo L), the request/acknowledge handshake of a
// micropipeline. A stage whose output differs from that of the next stage
// holds an event (token); the ring holds N of them, placed evenly at reset
// (str_trng_pkg::str_init_bit) and conserved while it runs. The Charlie
// effect of the stages keeps the events evenly spaced, so every stage output
// oscillates with the same period T and, when L and N are co-prime, the L
// outputs carry L equidistant phases: all 2L transitions of one period are
// T/(2L) apart. That fine phase grid is what the TRNG samples.
//
// Interface: rst_n (active low, asynchronous) loads the initial token pattern
// and stops the ring; c[L-1:0] are the stage outputs. Defaults are the main
// configuration, L = 511 stages with N = 256 events. N must be even and
// 0 < N < L (at least one token and one bubble).
`timescale 1ps / 1fs
module self_timed_ring #(
  parameter int unsigned L          = str_trng_pkg::STR_STAGES,
  parameter int unsigned N          = str_trng_pkg::STR_EVENTS,
  parameter real         DELAY_PS   = str_trng_pkg::STAGE_DELAY_PS,
  parameter real         CHARLIE_PS = str_trng_pkg::STAGE_CHARLIE_PS,
  parameter real         JITTER_PS  = str_trng_pkg::STAGE_JITTER_PS
) (
  input  logic         rst_n,
  output logic [L-1:0] c
);

  initial begin
    assert (N % 2 == 0 && N > 0 && N < L)
      else $error("self_timed_ring: N=%0d must be even and between 0 and L=%0d", N, L);
  end

  for (genvar i = 0; i < L; i++) begin : g_stage
    str_stage #(
      .INIT      (str_trng_pkg::str_init_bit(i, L, N)),
      .DELAY_PS  (DELAY_PS),
      .CHARLIE_PS(CHARLIE_PS),
      .JITTER_PS (JITTER_PS)
    ) u_stage (
      .rst_n(rst_n),
      .f    (c[(i + L - 1) % L]),
      .r    (c[(i + 1) % L]),
      .c    (c[i])
    );
  end

endmodule
