// tb_stat_tests: directed checks of the two health tests (long-run limit
// lowered to 8 to keep the runs short).
//  1. Alternating and random raw bits with runs below 8: no alarm.
//  2. A run of exactly 7 equal bits: no alarm; a run of 8: run cause set at the
//     clock edge that registers the 8th bit, alarm raised, and it stays until cleared.
//  3. Distinct words: no alarm; a repeated word: continuous cause set.
//  4. Clear drops both causes.
// The power-up tests (tested on their own) must be running after reset.
`timescale 1ps / 1ps
module tb_stat_tests;

  localparam int unsigned M = 16, LR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s = 1'b0, r_valid = 1'b0, clr = 1'b0;
  logic [M-1:0] r = '0;
  logic alarm;
  logic [2:0] cause;
  logic hold;
  logic [3:0] st_fail;
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  stat_tests #(.M(M), .LONG_RUN(LR)) dut (
    .clk_i(clk), .rst_ni(rst_n), .s_i(s), .r_i(r), .r_valid_i(r_valid),
    .clr_i(clr), .selftest_i(1'b0), .hold_o(hold), .selftest_fail_o(st_fail),
    .alarm_o(alarm), .cause_o(cause));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put_bit(logic b);
    s = b;
    @(posedge clk);
    #1;
  endtask

  task automatic put_word(logic [M-1:0] w);
    r = w;
    r_valid = 1'b1;
    @(posedge clk);
    #1;
    r_valid = 1'b0;
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    check(alarm == 1'b0 && cause == 3'b000, "alarm after reset");
    // 1. runs shorter than the limit
    for (int i = 0; i < 200; i++) put_bit(1'(i % 2));
    check(hold == 1'b1, "power-up tests not started after reset");
    for (int k = 1; k < LR; k++) begin
      repeat (k) put_bit(1'b1);
      repeat (k) put_bit(1'b0);
    end
    check(alarm == 1'b0, "alarm on runs below the limit");
    // 2. run of LR-1 then LR
    put_bit(1'b1);
    repeat (LR - 1) put_bit(1'b0);
    check(cause[1] == 1'b0, "run of LR-1 flagged");
    put_bit(1'b1);
    repeat (LR - 2) put_bit(1'b1);
    check(cause[1] == 1'b0, "run flagged before its LR-th bit was registered");
    put_bit(1'b1);
    check(cause[1] == 1'b1 && alarm == 1'b1, "run of LR not flagged");
    put_bit(1'b0);
    repeat (5) put_bit(1'($urandom));
    check(alarm == 1'b1, "alarm not sticky");
    // 4a. clear
    clr = 1'b1;
    put_bit(1'b1);
    clr = 1'b0;
    put_bit(1'b0);
    check(alarm == 1'b0 && cause == 3'b000, "clear did not drop the alarm");
    // 3. words
    for (int i = 0; i < 50; i++) begin
      put_word(M'(i * 40503 + 7));
      put_bit(1'(i % 2));
    end
    check(cause[0] == 1'b0, "continuous test fired on distinct words");
    put_word(16'hBEEF);
    put_bit(1'b1);
    check(cause[0] == 1'b0, "continuous test fired on a new word");
    put_word(16'hBEEF);
    check(cause[0] == 1'b1 && alarm == 1'b1, "repeated word not flagged");
    put_bit(1'b0);
    // 4b. clear, then words differ again
    clr = 1'b1;
    put_bit(1'b1);
    clr = 1'b0;
    put_word(16'h1234);
    put_bit(1'b0);
    check(alarm == 1'b0, "alarm after clear and a new word");
    check(hold == 1'b1 && st_fail == 4'b0000, "power-up tests ended early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
