// Shared constants and helpers of the self-timed-ring TRNG.
//
// The defaults describe the ring configuration that passes the statistical
// suites on raw data: a 511-stage ring holding 256 events, sampled by a
// 16 MHz system clock, with a parity filter of order 8 when compression is
// switched on. The timing constants of the ring model are this design's own
// choice, fitted so that the default ring oscillates at about 2.46 ns, the
// period measured for that configuration.
//
// str_init_bit() gives the reset value of every ring stage so that the N
// events start evenly spread around the L stages. A stage i holds an event
// (a "token") when its output differs from the output of stage i+1, so the
// output of stage i is the parity of the number of tokens placed in stages
// 0..i-1. Placing token k at stage floor(k*L/N) makes that count
// floor(i*N/L). N must be even for the ring to close on itself.
`timescale 1ps / 1fs
package str_trng_pkg;

  // Ring size and number of events of the main configuration.
  localparam int unsigned STR_STAGES   = 511;
  localparam int unsigned STR_EVENTS   = 256;
  // Parity filter order used when the output is compressed.
  localparam int unsigned FILTER_ORDER = 8;

  // Stage timing model, in picoseconds (model choice, see str_stage).
  localparam real STAGE_DELAY_PS   = 450.0;
  localparam real STAGE_CHARLIE_PS = 165.0;
  localparam real STAGE_JITTER_PS  = 1.9;

  // Reset value of stage i of an l-stage ring holding n evenly spread events.
  function automatic logic str_init_bit(int unsigned i, int unsigned l, int unsigned n);
    return logic'(((i * n) / l) & 1);
  endfunction

endpackage
