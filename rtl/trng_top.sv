// trng_top: vendor-independent true random number generator.
//
// Randomness comes from the timing jitter of free-running ring oscillators,
// which any FPGA can build from ordinary logic (no PLL, no analog parts).
// k identical short rings (default 110 rings of 3 stages, "minimal"
// configuration) are XORed into n(t) and sampled by one flip-flop at
// f_s = clk_i (40 MHz intended).  Not every sample falls in a jittered
// transition, so some of the sampled bits s[i] are deterministic; with 2 %
// jitter and 110 rings at least 60 % are random.  The post-processor applies a
// resilient function built from a [256,16] linear code with minimum distance
// 112: each block of 256 bits becomes a 16-bit word r[i] whose value is
// unbiased as long as no more than 111 of the 256 bits are deterministic.
// Health tests watch s[i] and r[i] and raise a sticky noise alarm; power-up
// tests examine the first 20 000 output bits after reset.  The output
// interface offers the words on a valid/ready port and withholds them while
// the power-up tests run and while the alarm is raised.
//
//   ring_en_i --> noise_source --n(t)--> digitizer --s[i]--> resilient_postproc
//                                             |                     | r[i]
//                                             +--> stat_tests <-----+
//                                                     | alarm       v
//                                                     +-----> output_interface
//
// Timing: one word per N = 256 clocks (2.5 Mbit/s at 40 MHz).  A word is
// offered one clock after the post-processor completes it; the raw bit the
// post-processor registers at an edge is n(t) of the edge before (digitizer).
// After reset the first 1250 words go to the power-up tests only (320 000
// clocks, 8 ms at 40 MHz); the first word offered is the one after them.
// Ports: s_o brings out the das-random bits for off-line evaluation of the
// raw source; alarm_cause_o tells which test fired (bit 0 continuous test on
// words, bit 1 long-run test on raw bits, bit 2 power-up tests);
// selftest_busy_o is high while the power-up tests run; ovf_o pulses when a
// word was discarded because the reader had not taken the previous one.
// The chain of rings, XOR, single sampling flip-flop and cyclic-code
// resilient function, with its sizes and the 40 MHz clock, follows the
// published design; the code polynomial, the test bounds, the alarm handling
// and the output interface are this implementation's own choices.
`timescale 1ps / 1ps
module trng_top #(
  parameter int unsigned  K        = 110,
  parameter int unsigned  L        = 3,
  parameter int unsigned  N        = trng_pkg::CODE_N,
  parameter int unsigned  M        = trng_pkg::CODE_M,
  parameter logic [N-M:0] G_POLY   = trng_pkg::G_POLY_256_16,
  parameter int unsigned  LONG_RUN = 34
) (
  input  logic         clk_i,         // sampling clock f_s
  input  logic         rst_ni,        // asynchronous reset, active low
  input  logic         ring_en_i,     // 1: rings oscillate
  input  logic         alarm_clr_i,   // clears the noise alarm
  input  logic         selftest_i,    // reruns the power-up tests
  output logic [M-1:0] rnd_o,         // external random number
  output logic         rnd_valid_o,
  input  logic         rnd_ready_i,
  output logic         ovf_o,
  output logic         noise_alarm_o,
  output logic [2:0]   alarm_cause_o,
  output logic         selftest_busy_o,
  output logic [3:0]   selftest_fail_o,
  output logic         s_o            // das-random bit stream
);

  logic         n;
  logic         s;
  logic [M-1:0] r;
  logic         r_valid;

  noise_source #(.K(K), .L(L)) u_noise (
    .en_i(ring_en_i),
    .n_o (n)
  );

  digitizer u_dig (
    .clk_i (clk_i),
    .rst_ni(rst_ni),
    .n_i   (n),
    .s_o   (s)
  );

  resilient_postproc #(.N(N), .M(M), .G_POLY(G_POLY)) u_post (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .s_i      (s),
    .r_o      (r),
    .r_valid_o(r_valid)
  );

  stat_tests #(.M(M), .LONG_RUN(LONG_RUN)) u_tests (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .s_i      (s),
    .r_i      (r),
    .r_valid_i(r_valid),
    .clr_i     (alarm_clr_i),
    .selftest_i(selftest_i),
    .hold_o    (selftest_busy_o),
    .selftest_fail_o(selftest_fail_o),
    .alarm_o   (noise_alarm_o),
    .cause_o  (alarm_cause_o)
  );

  output_interface #(.M(M)) u_out (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .r_i      (r),
    .r_valid_i(r_valid),
    .alarm_i  (noise_alarm_o || selftest_busy_o),
    .data_o   (rnd_o),
    .valid_o  (rnd_valid_o),
    .ready_i  (rnd_ready_i),
    .ovf_o    (ovf_o)
  );

  assign s_o = s;

endmodule
