# True random number generator on a self-timed ring

A digital circuit can only draw true randomness from analog noise, and in
logic the most accessible trace of that noise is **jitter**: the random
wander of a signal's transitions around their ideal instants. Jitter is tiny,
a few picoseconds against an oscillation period of nanoseconds, so sampling
one oscillator with a clock gives bits that are almost entirely predictable.
Sampling works only if some transition is always within a jitter's width of
the sampling instant: the time axis must be covered by a grid of transitions
whose spacing is comparable to the jitter.

The usual way to get such a grid is to XOR many free-running ring
oscillators, but their relative phases are left to chance, rings lock onto
each other, and large numbers of them are needed. This design instead uses
one **self-timed ring (STR)** of L stages carrying N events. The ring places
its own transitions: once it has settled, its L outputs switch at L
equidistant phases, and the 2L transitions of one period T lie exactly
T/(2L) apart. Making the ring longer makes the grid finer, down to the
jitter and below. Sampling all L outputs with the system clock and XORing
the samples gives one raw random bit per clock; an optional **parity filter**
XORs several raw bits into one when the grid is still too coarse.

```
               +--------------------+     +-------------+     +---------------+
  rst_n ------>| self_timed_ring    |  L  | str_sampler |     | parity_filter |--> rnd_bit
               | L stages, N events |---->| L DFFs, XOR |---->| order 8 / off |--> rnd_valid
               +--------------------+     +-------------+     +---------------+
                        |                        ^  raw_bit, raw_valid        ^
                        +--> str_out       clk --+----------------------------+   filter_en
```

The defaults follow the main configuration of the reference design: a
511-stage ring with 256 events (period about 2.46 ns, so a 2.4 ps grid
against 1.9 ps of jitter), a 16 MHz sampling clock giving 16 Mbit/s of raw
bits, and a filter of order 8 giving 2 Mbit/s when it is switched on.

## The self-timed ring

### Stages, tokens and bubbles

Each stage (`str_stage`) is a Muller C-element whose forward input is the
output of the previous stage and whose reverse input is the *inverted*
output of the next stage. A C-element copies its inputs to its output when
they agree and holds otherwise. This is a micropipeline stage: the forward
input is the request, the reverse input the acknowledge. Closing L of them
into a ring (`self_timed_ring`) gives an oscillator with no clock.

The state of the ring is described by **tokens** and **bubbles**. Stage i
holds a token when its output differs from the output of stage i+1, and a
bubble when they are equal. A stage fires (its output copies the previous
stage's output) exactly when a token sits in the previous stage and a bubble
in this one. Firing moves the token forward by one stage and the bubble
back by one. So the number of tokens is fixed by the reset state and kept
for ever. Around a closed ring it must be even. Two conditions are needed
for the ring to oscillate: at least one token and at least one bubble, that
is 0 < N < L. N is the number of "events" of the configuration tables below.

At reset every stage is loaded so that the N tokens are spread as evenly as
possible (token k in stage floor(k·L/N)). The output of stage i is then the
parity of floor(i·N/L), which is what `str_trng_pkg::str_init_bit` returns.

### Why the events space themselves evenly

A ring of plain inverters lets its transitions drift. In an STR a stage's
delay depends on *when* its two inputs arrived. This is the **Charlie
effect**: when the token and the bubble arrive at nearly the same time, the
stage is slower than when one of them came long before the other. If a token
runs ahead, it reaches a stage before that stage's bubble and is delayed. If
it falls behind, it finds a bubble waiting and passes quickly. The events
therefore settle into the **evenly-spaced mode**, where every stage sees the
same timing and each of them has the same period T. Two consequences matter:

* **Phases.** Stages n apart are shifted in phase by n·(N/L)·180°. When L
  and N are co-prime the L outputs take L different phases, equally spaced,
  and their rising and falling edges interleave, so the 2L transitions of a
  period are T/(2L) apart. That spacing is the phase resolution Δφ.
* **Jitter does not accumulate.** A transition pushed late by noise is
  pulled back by the next stages instead of being passed on, so each output
  carries roughly the jitter of one stage, not the sum of all of them.

### The model of a stage

`str_stage` is a behavioural model: its logic function is exact, but its
timing is written with real-valued delays, because the behaviour that the
generator depends on is analog. With tf and tr the times the forward and
reverse inputs last changed and s = (tf − tr)/2, an enabled stage switches at

    (tf + tr)/2 + DELAY_PS + sqrt(CHARLIE_PS² + s²) + jitter

so its delay after the later input is DELAY_PS + CHARLIE_PS when the inputs
arrive together and falls toward DELAY_PS as they move apart. The jitter is a
Gaussian term of standard deviation JITTER_PS, drawn anew for every
transition (Box–Muller on `$urandom`).

The constants are fitted, not measured. DELAY_PS = 450 and CHARLIE_PS = 165
make the 511/256 ring run at 2.46 ns, the period measured for that ring.
JITTER_PS = 1.9 is the jitter measured on it. The model has no routing, so
every ring with N close to L/2 oscillates at about 2.46 ns. The measured
periods of the smaller rings are shorter, about 2.07 ns. The **drafting
effect** is not modelled; in a real stage it shortens the delay when the
output switched only a short time before. The Charlie effect alone already
gives the evenly-spaced mode. A real STR has a second oscillation mode, in
which drafting gathers the events into a travelling burst. That mode cannot
appear in this model, so the model says nothing about which ring sizes and
token counts avoid it.

What the model shows, and what to keep in mind when using it:

* From the even reset pattern the phase grid needs time to become regular.
  For the 63-stage ring without jitter this takes about 0.5 µs; after that
  all transitions are within 0.2 % of T/(2L). Longer rings take longer.
* With jitter switched on, the grid stays even only on average. Slow,
  ring-wide phase waves make single gaps up to about 1.5 times the nominal
  resolution. The real ring's grid quality is not known beyond the measured
  jitter, so results on bias from this model are indicative only.
* The period of one output of the default ring varies by about 3.3 ps rms
  from one period to the next, against a measured jitter of 1.9 ps on the
  real ring. A period spans two transitions of the output, each with its own
  jitter, and the model's stage deviation was set to the measured figure.
* A stage whose transition is already under way when `rst_n` falls
  completes it first. Hold reset for a few nanoseconds.

The model can be simulated with Verilator (`--timing`) and parsed by any
SystemVerilog front end, but it does not synthesize. On an FPGA or ASIC each
stage is a C-element built from a LUT or a standard cell with feedback, and it
must be placed by hand.

## Sampling and the raw bit

`str_sampler` samples every ring output with its own D flip-flop on the
rising clock edge, then XORs the L samples. Each transition anywhere in the
ring toggles the XOR of all outputs, so that XOR is itself a square wave
that toggles every T/(2L). The raw bit is its value at the sampling instant.
Whether the toggle nearest to that instant came before or after it is what
the jitter decides.

For a sampling instant exactly between two grid transitions, the probability
that the raw bit takes its "expected" value u is

    P(u) = 1 − 2Φ(x) + 2Φ(x)²,   x = T / (4·L·σ)

where Φ is the standard normal distribution function and σ the jitter. The
absolute bias is |B| = |1/2 − P(u)|, and the entropy per bit is
H = −P log2 P − (1 − P) log2(1 − P). The document behind this design treats
this instant as the worst case and quotes these values as the maximal bias
and minimal entropy. With x small (grid finer than the jitter) P → 1/2; with
x large the bit is fully predictable. For the default ring, x = 2460 /
(4·511·1.9) ≈ 0.63, which gives a worst-case bias of about 0.12 and an entropy
of about 0.96.

| stages L | events N | period | resolution T/(2L) | jitter | worst bias | min. entropy | filter order for 0.99 |
|---|---|---|---|---|---|---|---|
| 63   | 32  | 2.07 ns | 16.4 ps | 2.1 ps | ≈ 0.5 | ≈ 0    | —  |
| 127  | 64  | 2.07 ns | 8.2 ps  | 1.7 ps | 0.46  | 0.26   | 38 |
| 255  | 128 | 2.08 ns | 4.0 ps  | 1.7 ps | 0.42  | 0.73   | 8  |
| 511  | 256 | 2.46 ns | 2.4 ps  | 1.9 ps | 0.12  | 0.96   | 3  |
| 1023 | 512 | 2.63 ns | 1.3 ps  | 1.8 ps | 0.01  | 0.99   | none |

These are figures measured on an FPGA implementation, and the bias and
entropy columns are computed from them. Every row is a setting of `L` and
`N`. The 511-stage ring's raw output passed FIPS 140-1, AIS-31 T0–T5 and NIST
SP 800-22 in that evaluation. With the order-8 filter the 127-, 255- and
511-stage rings passed all three. So two settings are natural: L = 511 raw
(large ring, fast output) or L = 255 with the filter (half the ring, one
eighth of the rate).

Timing of the sampler: the phases present at edge k appear on `raw_bit`
after edge k+1, which is two cycles of latency. One raw bit comes per clock.
`raw_valid` rises two clocks after reset. The XOR of all L samples is one
combinational tree between two registers (511 inputs at the default). At
16 MHz this is not a timing problem. The sampling flip-flops do go
metastable in hardware, which a two-state simulation cannot show.

## Parity filter

If successive raw bits are independent, each with bias b, the XOR of n of
them has bias 2^(n−1)·bⁿ. A few bits of moderate entropy then make one bit
of nearly full entropy, at the cost of dividing the throughput by n. The
"filter order" column above is the smallest n that reaches 0.99 bits of
entropy per output bit.

`parity_filter` keeps a one-bit accumulator and a counter. With `enable`
high it XORs every valid input bit into the accumulator. On the ORDER-th bit
it outputs the result, with `out_valid` high for one clock, and starts over.
Groups do not overlap. With `enable` low it passes every valid input bit on,
one clock later. A change of `enable` throws away the partial group, so no
output bit mixes the two modes. The order is a parameter (`FILTER_ORDER` at
the top, 8 by default), not a run-time setting.

## Top level: `str_trng_top`

| port | dir | meaning |
|---|---|---|
| `clk` | in | sampling clock, 16 MHz in the reference setup |
| `rst_n` | in | active low; holds the ring in its initial state (asynchronously) and resets sampler and filter (synchronously) |
| `filter_en` | in | 1: compressed output, one bit per `FILTER_ORDER` clocks; 0: raw output, one bit per clock |
| `rnd_bit`, `rnd_valid` | out | generator output; `rnd_valid` marks each new bit |
| `raw_bit`, `raw_valid` | out | the unfiltered stream, for test |
| `str_out` | out | output of ring stage 0, to bring off chip (e.g. through an LVDS pad) to measure period and jitter |

Parameters: `L` (511), `N` (256), `FILTER_ORDER` (8), and the stage model's
`DELAY_PS` (450.0), `CHARLIE_PS` (165.0) and `JITTER_PS` (1.9). N must be
even and 0 < N < L, and L and N should be co-prime; the ring asserts the
first two at time 0. `str_trng_pkg` holds these defaults and the reset
pattern function.

Latency: a raw bit reaches `rnd_bit` three clock edges after the edge that
sampled it in raw mode. In filtered mode the output comes one clock after the
raw bit that closes its group of eight.

Not included: the online health tests and cryptographic post-processing that
an AIS-31 PTG.2/PTG.3 certification would need. They remain to be designed.

## Files

| file | contents |
|---|---|
| `rtl/str_trng_pkg.sv` | defaults, stage timing constants, reset pattern function |
| `rtl/str_stage.sv` | behavioural STR stage: C-element, Charlie delay, jitter |
| `rtl/self_timed_ring.sv` | L stages closed into a ring, reset pattern |
| `rtl/str_sampler.sv` | L sampling flip-flops and the XOR |
| `rtl/parity_filter.sv` | parity filter with bypass |
| `rtl/str_trng_top.sv` | the generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_trng_statistics` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself; each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/str_trng_pkg.sv rtl/str_stage.sv rtl/self_timed_ring.sv \
    rtl/str_sampler.sv rtl/parity_filter.sv rtl/str_trng_top.sv \
    tb/tb_str_trng_top.sv --top-module tb_str_trng_top -o sim
./obj_dir/sim
```

(for the other testbenches, list the files they use and change the top).
Verilator warns that the stage's delay is not known at compile time (ZERODLY).
Every delay is positive, so `--no-sched-zero-delay` is safe and a little
faster.

| testbench | what it covers | size | run time |
|---|---|---|---|
| `tb_str_stage` | C-element function, Charlie delay against the formula for several input separations, jitter spread, reset | 1 stage | < 1 s |
| `tb_self_timed_ring` | reset pattern, token conservation, common period, evenly spaced 2L-phase grid (jitter-free copy) | 63/32 | ~15 s build, 1 s run |
| `tb_str_sampler` | raw bit = XOR of the phases sampled two clocks before, rate, reset | 511 | seconds |
| `tb_parity_filter` | XOR of each group of 8, one output per 8 inputs, bypass, mode switches; orders 3 and 38 alongside | orders 8, 3, 38 | seconds |
| `tb_str_trng_top` | whole generator at every default: ring period ≈ 2.46 ns and its jitter, raw stream checked against the XOR of the ring, raw mode, filtered mode, both mode switches | 511/256 | ~2 min build, ~45 s run |
| `tb_jitter_source` | four 127/64 generators from one reset: two jitter-free ones give identical streams, two jittered ones do not | 4 × 127/64 | ~30 s build, 30 s run |
| `tb_trng_statistics` | 400 raw and 50 compressed bits from a 127/64 ring: rates, scaled monobit, runs and long-run tests | 127/64 | ~30 s build, 20 s run |

Simulation is event-level: the default ring makes about 400 transitions per
nanosecond, and Verilator advances about 170 ns of circuit time per second.
One raw bit at 16 MHz therefore costs about a third of a second. That is why
the statistical run uses a 127-stage ring and a few hundred bits, not the
20000-bit blocks of FIPS 140-2.
