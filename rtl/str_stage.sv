// One stage of a self-timed ring: a Muller C-element whose reverse input is
// inverted. Behavioural model (not synthesizable): the stage's logic function
// is exact, but its timing is an analog model written with delays.
//
// Function. The forward input f is the output of the previous stage, the
// reverse input r the output of the next stage. The C-element copies f to its
// output c when f and the inverted r agree, and otherwise holds. The stage
// therefore fires (c <= f) when it is "enabled": f != c (an event waits in the
// previous stage) and r == c (this stage holds a bubble, the next stage has
// taken the previous event). In a ring, inputs never change while a stage is
// enabled, which the model relies on.
//
// Timing. The stage delay follows the Charlie effect: the closer the two input
// events, the longer the delay. With tf and tr the times the inputs last
// changed and s = (tf - tr)/2, the output switches at
//     (tf + tr)/2 + DELAY_PS + sqrt(CHARLIE_PS^2 + s^2) + jitter,
// i.e. DELAY_PS + CHARLIE_PS after two simultaneous inputs and DELAY_PS
// after the later of two far-apart ones. This is what spreads the events
// evenly around the ring. The jitter is a Gaussian term of standard deviation
// JITTER_PS, drawn independently for every transition (thermal noise of the
// stage). The drafting effect (a shorter delay shortly after the previous
// output transition) is not modelled. The Charlie and drafting behaviour come
// from the document; the closed form and its constants are this model's.
//
// Reset. While rst_n is low the output is held at INIT; the stage may fire
// again once rst_n is high. Reset is asynchronous, but a transition already
// under way completes its delay first and then yields to the reset, so the
// output reaches INIT at most one stage delay after rst_n falls. Hold reset
// for a few stage delays.
`timescale 1ps / 1fs
module str_stage #(
  parameter bit  INIT       = 1'b0,
  parameter real DELAY_PS   = str_trng_pkg::STAGE_DELAY_PS,
  parameter real CHARLIE_PS = str_trng_pkg::STAGE_CHARLIE_PS,
  parameter real JITTER_PS  = str_trng_pkg::STAGE_JITTER_PS
) (
  input  logic rst_n,
  input  logic f,   // forward input: output of the previous stage
  input  logic r,   // reverse input: output of the next stage (inverted inside)
  output logic c    // stage output
);

  localparam real TWO_PI = 6.283185307179586;
  localparam real MIN_DELAY_PS = 0.001;

  logic f_last, r_last, rst_last;
  real  t_f, t_r, s, dly;

  // Standard normal sample by the Box-Muller transform.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(TWO_PI * u2);
  endfunction

  initial begin
    c        = INIT;
    f_last   = f;
    r_last   = r;
    rst_last = rst_n;
    t_f      = 0.0;
    t_r      = 0.0;
  end

  always begin
    @(f or r or rst_n);
    if (f != f_last) t_f = $realtime;
    if (r != r_last) t_r = $realtime;
    if (rst_n && !rst_last) begin
      // leaving reset: both inputs count as just arrived
      t_f = $realtime;
      t_r = $realtime;
    end
    f_last   = f;
    r_last   = r;
    rst_last = rst_n;
    if (!rst_n) begin
      c = INIT;
    end else if ((f != c) && (r == c)) begin
      s   = (t_f - t_r) / 2.0;
      dly = (t_f + t_r) / 2.0 + DELAY_PS + $sqrt(CHARLIE_PS * CHARLIE_PS + s * s)
            - $realtime;
      if (JITTER_PS > 0.0) dly = dly + JITTER_PS * gauss();
      if (dly < MIN_DELAY_PS) dly = MIN_DELAY_PS;
      #(dly);
      c = rst_n ? f : INIT;
    end
  end

endmodule
