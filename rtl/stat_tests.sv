// stat_tests: online health tests of the generator, raising a noise alarm.
//
// Two tests run continuously, and a set of power-up tests runs once after
// reset and again on each selftest_i pulse:
//   * continuous test on the internal random words r[i]: two successive words
//     must differ.  An identical pair sets the cont cause bit.
//   * long-run test on the das-random bits s[i] (before post-processing): a
//     run of LONG_RUN or more equal bits sets the run cause bit.  It catches a
//     dead or locked noise source, e.g. rings stopped or all in step.
//   * power-up tests (startup_tests: monobit, poker, runs, long run on 20 000
//     bits of words): a failure sets the startup cause bit.  While they run,
//     hold_o is high so that no word leaves the generator untested.
// The alarm is sticky: alarm_o = OR of the cause bits, which stay set until
// clr_i is pulsed.  The continuous test compares against the previous word
// even across a clear.
//
// The continuous test is the classic one for internal random numbers; the
// long-run limit of 34 is the FIPS 140-1 long-run bound, taken here as the
// per-stream limit (this design's choice).  With m = 16 the continuous test
// fails by chance once per 65 536 words on average, so an alarm must be
// cleared and the test repeated before a source is declared broken.
//
// Interface: s_i is valid every clock; r_i is valid when r_valid_i is high.
// Cause bits are registered: set at the clock edge that registers the
// failing bit or word; alarm_o follows them combinationally.
// cause_o[0] = continuous test failed, cause_o[1] = long-run test failed,
// cause_o[2] = power-up tests failed; selftest_fail_o tells which of them
// (bit 0 monobit, 1 poker, 2 runs, 3 long run), valid from their end.
// The power-up tests start one clock after reset release.
`timescale 1ps / 1ps
module stat_tests #(
  parameter int unsigned M        = trng_pkg::CODE_M,
  parameter int unsigned LONG_RUN = 34
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         s_i,
  input  logic [M-1:0] r_i,
  input  logic         r_valid_i,
  input  logic         clr_i,
  input  logic         selftest_i,
  output logic         hold_o,
  output logic [3:0]   selftest_fail_o,
  output logic         alarm_o,
  output logic [2:0]   cause_o
);

  localparam int unsigned RW = $clog2(LONG_RUN + 1);

  logic [M-1:0]  prev_r;
  logic          have_prev;
  logic          prev_s;
  logic [RW-1:0] run_len;   // length of the current run of equal s bits
  logic          cont_fail, run_fail;
  logic [RW-1:0] run_next;
  logic          powered;   // low in the first clock after reset
  logic          st_done, st_pass;

  startup_tests #(.M(M)) u_startup (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (!powered || selftest_i),
    .r_i      (r_i),
    .r_valid_i(r_valid_i),
    .busy_o   (hold_o),
    .done_o   (st_done),
    .pass_o   (st_pass),
    .fail_o   (selftest_fail_o)
  );

  always_comb begin
    if (s_i == prev_s) run_next = (run_len == RW'(LONG_RUN)) ? run_len : run_len + 1'b1;
    else               run_next = RW'(1);
  end

  assign cont_fail = r_valid_i && have_prev && (r_i == prev_r);
  assign run_fail  = (run_next == RW'(LONG_RUN));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      prev_r    <= '0;
      have_prev <= 1'b0;
      prev_s    <= 1'b0;
      run_len   <= '0;
      cause_o   <= '0;
      powered   <= 1'b0;
    end else begin
      powered <= 1'b1;
      prev_s  <= s_i;
      run_len <= run_next;
      if (r_valid_i) begin
        prev_r    <= r_i;
        have_prev <= 1'b1;
      end
      if (clr_i) cause_o <= '0;
      else       cause_o <= cause_o | {st_done && !st_pass, run_fail, cont_fail};
    end
  end

  assign alarm_o = |cause_o;

endmodule
