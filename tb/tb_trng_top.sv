// tb_trng_top: end-to-end test of the complete generator at its default
// size (110 rings of 3 stages, [256,16] code, 40 MHz sampling clock).
//
// The raw bits s are recorded as the post-processor samples them; every word
// handed out must equal the generator-matrix product of one recorded block,
// blocks being taken in order (a word skipped by the output stage is
// allowed only where an overflow or the alarm explains it).
// Phases and the mechanisms they must provoke (each counted, none may be 0):
//   0. power-up tests: the first 1250 words (20 000 bits) are examined and
//      withheld; the tests must pass on the generator's own output, and the
//      first word offered must be the one right after them;
//   1. reader always ready: 6 words, one every 256 clocks exactly, none lost;
//   2. reader stalls for 3 blocks: the output stage drops words (overflow);
//   3. rings disabled: raw bits freeze, the long-run test and then the
//      continuous test fire, and no word is handed out during the alarm;
//   4. rings enabled and alarm cleared: words flow again and match.
// It also checks that the raw stream is not stuck while the rings run
// (ones between 25 % and 75 %).
`timescale 1ps / 1ps
module tb_trng_top;
  import tb_trng_ref_pkg::*;

  localparam int unsigned N = 256, M = 16, NW_TEST = 20_000 / 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ring_en = 1'b0, clr = 1'b0, ready = 1'b1;
  logic [M-1:0] rnd;
  logic rnd_valid, ovf, alarm, s;
  logic [2:0] cause;
  logic st_busy;
  logic [3:0] st_fail;
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;   // 40 MHz

  trng_top dut (
    .clk_i(clk), .rst_ni(rst_n), .ring_en_i(ring_en), .alarm_clr_i(clr),
    .selftest_i(1'b0), .selftest_busy_o(st_busy), .selftest_fail_o(st_fail),
    .rnd_o(rnd), .rnd_valid_o(rnd_valid), .rnd_ready_i(ready), .ovf_o(ovf),
    .noise_alarm_o(alarm), .alarm_cause_o(cause), .s_o(s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-M:0] g;
  logic [N-1:0] cur;
  logic [M-1:0] expected[$];
  int nbit = 0;
  longint cycle = 0;
  int next_blk = 0;        // first block not yet matched
  int words = 0, skipped = 0, spacing_ok = 0;
  int n_selftest = 0, n_ovf = 0, n_run_alarm = 0, n_cont_alarm = 0, n_blocked = 0, n_disabled = 0;
  int ones = 0, sampled = 0;
  bit strict = 1'b1;       // phase 1: no word may be skipped
  longint last_word_cycle = -1;

  // Raw bits, as the post-processor registers them at each rising edge.
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    cur[nbit] = s;
    if (ring_en) begin ones += int'(s); sampled++; end
    nbit++;
    if (nbit == N) begin expected.push_back(resilient(cur, g)); nbit = 0; end
  end

  // Words handed out.
  always @(posedge clk) if (rst_n) begin
    if (ovf) n_ovf++;
    if (alarm && expected.size() > next_blk + 1) n_blocked++;
    if (rnd_valid && ready) begin
      automatic int k = next_blk;
      check(!alarm, "word handed out while the alarm is raised");
      if (st_busy) begin
        check(1'b0, "word handed out during the power-up tests");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      while (k < expected.size() && expected[k] != rnd) k++;
      check(k < expected.size(), $sformatf("word %h matches no block", rnd));
      if (k < expected.size()) begin
        if (strict && words == 0)
          check(k == int'(NW_TEST), $sformatf("first word offered is block %0d", k));
        if (strict && words > 0) check(k == next_blk, $sformatf("word %0d skipped %0d blocks", words, k - next_blk));
        skipped += k - next_blk;
        next_blk = k + 1;
      end
      if (strict && last_word_cycle >= 0)
        check(cycle - last_word_cycle == longint'(N), $sformatf("word spacing %0d", cycle - last_word_cycle));
      last_word_cycle = cycle;
      words++;
    end
  end

  initial begin
    #(longint'(25000) * 400_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_words(int n);
    automatic int target = words + n;
    while (words < target) @(posedge clk);
  endtask

  initial begin
    g = derive_gpoly();
    ring_en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 0. power-up tests
    repeat (3) @(negedge clk);
    check(st_busy, "power-up tests not running");
    while (st_busy) @(negedge clk);
    check(cause == 3'b000 && st_fail == 4'b0000,
          $sformatf("power-up tests failed: cause %b, tests %b", cause, st_fail));
    if (cause == 3'b000) n_selftest++;
    check(words == 0, "words offered during the power-up tests");
    // 1. free-running, reader always ready
    wait_words(6);
    check(next_blk == int'(NW_TEST) + 6, $sformatf("phase 1: %0d words from %0d blocks", words, next_blk));
    check(cause == 3'b000, "alarm while the source runs");
    check(ones > sampled / 4 && ones < sampled * 3 / 4,
          $sformatf("raw stream stuck: %0d ones in %0d bits", ones, sampled));
    // 2. reader stalls
    strict = 1'b0;
    @(negedge clk);
    ready = 1'b0;
    repeat (3 * N) @(negedge clk);
    ready = 1'b1;
    wait_words(2);
    check(n_ovf >= 2, $sformatf("phase 2: %0d overflows", n_ovf));
    // 3. rings stopped
    @(negedge clk);
    ring_en = 1'b0;
    n_disabled++;
    repeat (40) @(negedge clk);
    check(cause[1] == 1'b1, "long-run test did not fire on a frozen source");
    if (cause[1]) n_run_alarm++;
    repeat (3 * N) @(negedge clk);
    check(cause[0] == 1'b1, "continuous test did not fire on repeated words");
    if (cause[0]) n_cont_alarm++;
    check(alarm == 1'b1, "no noise alarm");
    // 4. restart: rings on, let a clean block pass, then clear
    ring_en = 1'b1;
    repeat (N + 10) @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    wait_words(3);
    check(alarm == 1'b0, "alarm came back after restart");

    $display("power-up tests passed %0d, words %0d, skipped blocks %0d, overflows %0d, run alarms %0d, continuous alarms %0d, blocked cycles %0d, ring stops %0d",
             n_selftest, words, skipped, n_ovf, n_run_alarm, n_cont_alarm, n_blocked, n_disabled);
    check(n_selftest > 0, "mechanism never seen: power-up tests passed");
    check(n_ovf > 0, "mechanism never seen: overflow");
    check(n_run_alarm > 0, "mechanism never seen: long-run alarm");
    check(n_cont_alarm > 0, "mechanism never seen: continuous-test alarm");
    check(n_blocked > 0, "mechanism never seen: output withheld during alarm");
    check(n_disabled > 0, "mechanism never seen: rings disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
