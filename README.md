# Ring-oscillator true random number generator for any FPGA

This generator makes true random bits from nothing but ordinary FPGA logic:
no PLL, no vendor primitive, no analog part. Its entropy comes from the timing
jitter of free-running ring oscillators. Many identical short rings are
XORed together and the result is sampled by one flip-flop. Some of the
sampled bits are deterministic, because the sampling edge misses every jittered
transition. A post-processor removes their influence with a *resilient
function*: a linear map from a block of 256 sampled bits to a 16-bit word. The
word stays unbiased as long as no more than 111 of the 256 bits are
deterministic.

The main configuration uses 110 rings of 3 stages, samples at 40 MHz and
delivers one 16-bit word every 256 clocks, which is 2.5 Mbit/s.

```
 ring_en_i                                 clk_i (f_s = 40 MHz)
    |                                          |
 +--v---------------------+   n(t)   +---------v--+  s[i]  +--------------------+  r[i]
 | noise_source           |--------->| digitizer  |------->| resilient_postproc |--(16)--+
 |  K x ring_oscillator   |          |  (1 D-FF)  |   |    |  [256,16] code     |        |
 |  (L stages each), XOR  |          +------------+   |    +--------------------+        |
 +------------------------+                           |              | r[i]              |
                                                      v              v                   v
                                                 +--------------------------+   +------------------+
                                                 | stat_tests               |-->| output_interface |--> rnd_o / rnd_valid_o
                                                 |  long run on s[i],       |   |  valid/ready,    |<-- rnd_ready_i
                                                 |  continuous test on r[i] |   |  drop on overrun |--> ovf_o
                                                 |  power-up tests on r[i]  |   +------------------+
                                                 +--------------------------+
                                                        | noise_alarm_o, alarm_cause_o
```

## Noise source: many rings, identical length, partial fill

A ring oscillator is an odd number of inverting stages closed in a loop. One
stage is a NAND gate, so the ring can be stopped (`ring_en_i = 0`). The period
is set by the gate delays. Each edge arrives with a small random shift, the
jitter. One ring alone gives little randomness: a sampling clock mostly
lands on the flat, predictable parts of its waveform.

The XOR of k rings has k times as many transitions. Each transition carries a
narrow "jitter zone" in which its position is uncertain. With enough rings,
most sampling instants fall inside some jitter zone. The *fill rate* f is the
fraction of samples that do. A fill rate near 1 needs very many rings,
and the effort grows exponentially. The design therefore accepts f = 0.6
and lets the post-processor deal with the other 40 %.

Ring count against fill rate (99 % confidence), from the statistical model
of this generator family:

| jitter σ / period | f = 0.50 | 0.60 | 0.70 | 0.80 | 0.90 | 0.95 |
|---|---|---|---|---|---|---|
| 2 % | 83 | 110 | 146 | 198 | 292 | 393 |
| 1 % | 158 | 210 | 277 | 374 | 548 | 733 |

All rings have the same length. Relatively prime lengths bring no benefit.
With 2 % jitter, 110 rings reach f = 0.6. If the real jitter is
only 1 %, 210 rings are needed. This is the "robust" variant (`K = 210`).

Short rings (3 stages) are used instead of the 13-stage rings of the
original proposal. Short rings need about four times fewer gates, and
measurements suggest they have relatively more jitter. A 3-stage ring runs at about 3 ns
(333 MHz). The sampling clock nevertheless stays at 40 MHz, because a faster
one could not be justified by the entropy model. Rings placed next to each
other tend to lock in phase. In hardware, spread them out, or add more rings
than the model demands.

Measured ring periods on a 0.13 µm FPGA, as used by the model
(`trng_pkg::ring_period_ps`):

| stages | 1 | 3 | 5 | 7 | 9 | 13 | 19 | 25 | 31 | 41 | 57 | 67 | 83 | 101 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| period (ns) | 2.7 | 3.0 | 5.0 | 6.6 | 7.5 | 10 | 15 | 20 | 25 | 38 | 51 | 58 | 72 | 90 |

Other lengths use the linear fit T ≈ 0.88·l − 0.23 ns.

## Digitizer

One D flip-flop samples n(t) on every `clk_i` edge. It is meant to sample
inside transitions, so it will sometimes go metastable. Metastability is
part of the entropy source here, not a fault. A 25 ns clock period leaves
ample time for it to resolve. No synchronizer is added, because a second
flop would only delay the bit.

## Post-processor: a resilient function from a linear code

This block carries the design's guarantee and is the least obvious part.

**The function.** Take a binary [n, m, d] linear code with generator matrix G
(m × n). A block of n sampled bits s becomes the m-bit word r = s·Gᵀ.
Suppose up to d − 1 of the n input bits are fixed or adversarial and the rest
are uniform and independent. Then r is exactly uniform. In other words, the
map is (d − 1)-resilient. This design uses n = 256 and m = 16, a
compression of 16. At f = 0.6 about (1 − 0.6)·256 ≈ 103 bits per block
are deterministic, so d − 1 must exceed 103.

**Cyclic form makes it cheap.** For a code generated by a polynomial
g(x) = g₀ + g₁x + … + g₂₄₀x²⁴⁰, row j of G is g shifted by j places. Output
bit j is then

    r_j = XOR over t = 0..240 of  g_t · s_{j+t}

which is a 241-bit sliding window with fixed XOR taps. The hardware
(`resilient_postproc`) does this:

* A 240-bit serial shift register takes one sampled bit per clock. Together
  with the incoming bit it forms the 241-bit window.
* An XOR tree over the taps where g_t = 1 computes one output bit per clock.
* A block lasts 256 clocks. For the first 240 clocks the window only
  fills. In the last 16 clocks each XOR result is shifted into a 16-bit
  serial-in/parallel-out register, which is clock-enabled only during those
  clocks. A free-running 8-bit counter from reset marks the phases.
* Blocks do not overlap, and a word depends only on its own 256 bits. The
  post-processor therefore has no memory from word to word.

**The polynomial.** The published design names a [256,16,113] code but not
its coefficients. This implementation uses

    g(x) = (x + 1) · (x²⁵⁵ + 1) / (m₁(x) · m₃(x))

Here m₁ = x⁸+x⁴+x³+x²+1 (0x11D) and m₃ = x⁸+x⁶+x⁵+x⁴+x²+x+1 (0x177) are the
minimal polynomials of α and α³ in GF(2⁸). The quotient generates the
cyclic [255,16,112] code, the dual of the double-error-correcting BCH code.
The factor (x+1) brings the degree to 240. Enumerating all 65 535 non-zero
codewords gives a minimum distance of 112 for the resulting [256,16] code,
so 111 deterministic bits per block are tolerated. That is one less than
the published code, and still above the 103 the noise source is expected
to produce. Any other degree-240 polynomial can be set through the `G_POLY`
parameter.

**Timing.** `r_valid_o` pulses one clock after the 256th bit of a block has
been registered. Blocks are counted from reset release. `r_o[0]` is the
first output bit of the block. The digitizer adds one clock in front, and
the output interface one clock behind. At the top level the first 1250
words go only to the power-up tests. After that, a ready reader gets one
word exactly every 256 clocks.

## Health tests and the output port

`stat_tests` runs two online tests and a power-up test set, and raises a
sticky `noise_alarm_o`. The alarm stays until `alarm_clr_i` is pulsed.
`alarm_cause_o` shows which test fired:

* **continuous test** (bit 0): two successive 16-bit words must differ.
  With 16-bit words this also fails by chance, about once per 65 536 words.
  Treat an alarm as a request to clear and retest, not as proof of failure.
* **long-run test** (bit 1): a run of `LONG_RUN` (default 34) equal raw bits
  s[i]. This catches a stopped or locked noise source within about a
  microsecond, long before the post-processed words show anything.
* **power-up tests** (bit 2, `startup_tests`): these start one clock after
  reset, and again on each `selftest_i` pulse. They examine the next 20 000
  output bits (1250 words, bit 0 of each word first) with the four classic
  tests, using the FIPS 140-1 sample size and bounds:
  * monobit: 9654 < ones < 10346.
  * poker over 5000 nibbles: 1.03 < 16/5000·Σf² − 5000 < 57.4. The
    hardware evaluates this in integers as 25 005 150 < 16·Σf² < 25 287 000.
  * runs of ones and of zeros of length 1, 2, 3, 4, 5 and ≥6: each count
    must lie within [2267,2733], [1079,1421], [502,748], [223,402],
    [90,223] and [90,223].
  * long run: no run of 34 or more.

  The bits are examined serially, one per clock. `selftest_fail_o` shows
  which test failed. No word is offered while the tests run
  (`selftest_busy_o`). At 40 MHz they take 320 000 clocks, which is 8 ms.

`output_interface` holds one word and offers it on a valid/ready port. A word
arriving while the held one has not been taken is discarded and flagged on
`ovf_o`. Random words need no queue, so a slow reader simply gets
younger words. While the alarm is raised, the held word is dropped and no
new word is offered.

## Top-level interface (`trng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i` | in | 1 | sampling clock f_s, 40 MHz intended |
| `rst_ni` | in | 1 | asynchronous reset, active low |
| `ring_en_i` | in | 1 | 1 = rings run, 0 = rings stopped (power saving) |
| `alarm_clr_i` | in | 1 | clears the noise alarm |
| `selftest_i` | in | 1 | reruns the power-up tests |
| `rnd_o` | out | M | random word |
| `rnd_valid_o`, `rnd_ready_i` | out/in | 1 | handshake; a word moves when both are high |
| `ovf_o` | out | 1 | pulse: a word was discarded |
| `noise_alarm_o` | out | 1 | health-test alarm |
| `alarm_cause_o` | out | 3 | bit 0 continuous test, bit 1 long-run test, bit 2 power-up tests |
| `selftest_busy_o` | out | 1 | power-up tests running; no word is offered |
| `selftest_fail_o` | out | 4 | failed power-up test: bit 0 monobit, 1 poker, 2 runs, 3 long run |
| `s_o` | out | 1 | raw sampled bits, for off-line evaluation of the source |

Parameters: `K` rings (110), `L` stages per ring (3), `N`/`M` code length and
dimension (256/16), `G_POLY` generator polynomial, `LONG_RUN` (34).
Configurations: "minimal" K=110, L=3 (default); "reference" K=110, L=13;
"robust" K=210, L=3. On a Virtex-II Pro these took about 565, 1664 and 973
slices, of which the post-processor is about 115.

## What is a model and what is hardware

`ring_oscillator` is a **behavioural simulation model**, not synthesizable
logic. It produces the ring's period with Gaussian jitter (σ = 2 % of the
period per cycle, by default), a static mismatch of up to ±1 % per ring and
a random start phase. It does not model phase locking between neighbouring
rings or the non-square waveform of very short rings. Simulation therefore
shows that the logic is correct. It cannot show how much entropy a real
device yields. To build the generator in an FPGA, replace the model with
a placed NAND plus L−1 inverters per ring (some tools also need a
transparent latch in the loop). Apply the vendor's attributes to keep the
loop and to stop timing analysis on it. `noise_source` contains the
rings, so it is simulation-only as written. `digitizer`,
`resilient_postproc`, `stat_tests`, `startup_tests` and `output_interface` are ordinary
synthesizable RTL.

Design choices made here, beyond the published design:

* the generator polynomial above (d = 112 rather than 113);
* a clock enable on the output shift register instead of a gated clock;
* the reset style (asynchronous, active low) and the block counter;
* the long-run threshold on raw bits, the power-up test sizes and bounds
  (FIPS 140-1), the sticky alarm and its clear input, and withholding
  output during the power-up tests;
* the entire output interface (one-word buffer, drop on overrun, blocking during alarm);
* the `s_o` and `alarm_cause_o` observation ports.

## Simulating

All files use `timescale 1ps/1ps`. The ring model needs `--timing`.
Example for the full design at its default size:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/trng_pkg.sv tb/tb_trng_ref_pkg.sv tb/tb_trng_top.sv \
    --top-module tb_trng_top -o sim && ./obj_dir/sim
```

Other blocks work the same way with `tb/tb_<block>.sv` and `--top-module tb_<block>`.
List `tb/tb_trng_ref_pkg.sv` before a testbench that imports it.
Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_trng_top` | Runs the full default design (110 rings, 40 MHz). The power-up tests must pass on the design's own output while no word is offered. Every word is compared with the generator-matrix product of its recorded raw block. With the reader always ready, words come exactly 256 clocks apart. It also provokes a reader stall (overflow), stopped rings (long-run alarm, then continuous alarm, output withheld), and a restart after clear. It takes about 3.5 minutes of CPU time, mostly in the 320 000 clocks of the power-up tests. |
| `tb_trng_configs` | Runs the minimal (110×3), reference (110×13) and robust (210×3) noise sources side by side, each through its own digitizer and post-processor, for 10 blocks. It checks every word and the word spacing, and that the raw stream is not stuck. |
| `tb_resilient_postproc` | Rebuilds g(x) from its definition and compares it with the RTL constant. Enumerates the code to confirm d = 112. Checks 14 blocks (random, all-0, all-1) against the matrix product, plus the valid timing. |
| `tb_ring_oscillator` | Checks the mean period for 3 and 13 stages, a jitter of about 2 %, the hold while disabled, and the restart. |
| `tb_noise_source` | Checks that n equals the XOR of the ring outputs at every ring event, and the disabled level. |
| `tb_digitizer` | Checks that s equals n at the previous clock edge, and the reset value. |
| `tb_stat_tests` | Checks the run-length boundaries at LONG_RUN − 1 and LONG_RUN, repeated words, stickiness and clear, and that the power-up tests start after reset. |
| `tb_startup_tests` | Runs four 20 000-bit samples (random, biased, one long run, a fixed pattern) against a software computation of the four statistics. |
| `tb_output_interface` | Runs random traffic against a cycle model and checks ordering, overflow and alarm flush. |

`tb_trng_ref_pkg` holds the reference arithmetic (GF(2) polynomial product and
division, the matrix product) shared by the testbenches.
