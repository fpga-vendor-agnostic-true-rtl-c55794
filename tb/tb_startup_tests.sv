// tb_startup_tests: power-up tests against a reference computed in the
// testbench from the same 20 000 bits.
// Four samples are fed as 1250 16-bit words, one word every 20 clocks:
//   random words (all tests should pass), words with a 5/8 ones bias
//   (monobit fails), random words with one run of 40 zeros (long run fails),
//   and the constant word 5555h (poker and runs fail, monobit passes).
// For each sample the DUT's fail vector must equal the reference and match
// the expected outcome; done must come within 2 clocks of the last bit and
// busy must be high in between.
`timescale 1ps / 1ps
module tb_startup_tests;

  localparam int unsigned M = 16, NB = 20_000, NW = NB / M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, r_valid = 1'b0;
  logic [M-1:0] r = '0;
  logic busy, done, pass;
  logic [3:0] fail;
  int checks = 0, failures = 0;
  logic [M-1:0] words[NW];

  always #12500 clk = ~clk;

  startup_tests dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .r_i(r), .r_valid_i(r_valid),
                     .busy_o(busy), .done_o(done), .pass_o(pass), .fail_o(fail));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference statistics over words[], bit 0 of each word first.
  function automatic logic [3:0] reference();
    int ones = 0, nib = 0, runlen = 0, longest = 0;
    int f[16];
    int runs[2][6];
    logic prev = 1'b0;
    longint sumsq = 0;
    int lo[6] = '{2267, 1079, 502, 223, 90, 90};
    int hi[6] = '{2733, 1421, 748, 402, 223, 223};
    logic [3:0] v = '0;
    foreach (f[i]) f[i] = 0;
    for (int b = 0; b < 2; b++) for (int l = 0; l < 6; l++) runs[b][l] = 0;
    for (int i = 0; i < NB; i++) begin
      logic b = words[i / M][i % M];
      ones += int'(b);
      nib |= int'(b) << (i % 4);
      if (i % 4 == 3) begin f[nib]++; nib = 0; end
      if (i > 0 && b == prev) runlen++;
      else begin
        if (i > 0) runs[prev][(runlen >= 6) ? 5 : runlen - 1]++;
        runlen = 1;
      end
      if (runlen > longest) longest = runlen;
      prev = b;
    end
    runs[prev][(runlen >= 6) ? 5 : runlen - 1]++;
    foreach (f[i]) sumsq += longint'(f[i]) * f[i];
    v[0] = !(ones > 9654 && ones < 10346);
    v[1] = !(16 * sumsq > 25_005_150 && 16 * sumsq < 25_287_000);
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < 6; l++)
        if (runs[b][l] < lo[l] || runs[b][l] > hi[l]) v[2] = 1'b1;
    v[3] = longest >= 34;
    return v;
  endfunction

  task automatic run_sample(logic [3:0] expected, string name);
    logic [3:0] ref_v = reference();
    int waited = 0;
    check(ref_v == expected, $sformatf("%s: reference verdict %b, expected %b", name, ref_v, expected));
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, $sformatf("%s: not busy after start", name));
    for (int w = 0; w < NW; w++) begin
      r = words[w];
      r_valid = 1'b1;
      @(negedge clk);
      r_valid = 1'b0;
      repeat (19) @(negedge clk);
      if (w < NW - 1 && !busy) begin check(1'b0, $sformatf("%s: finished early at word %0d", name, w)); break; end
    end
    while (!done && waited < 5) begin @(negedge clk); waited++; end
    check(done || fail == ref_v, $sformatf("%s: no done", name));
    check(!busy, $sformatf("%s: still busy", name));
    check(fail == ref_v, $sformatf("%s: DUT verdict %b, reference %b", name, fail, ref_v));
    check(pass == (ref_v == '0), $sformatf("%s: pass flag %b", name, pass));
  endtask

  initial begin
    #(longint'(25000) * 1_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (words[w]) words[w] = M'($urandom);
    run_sample(4'b0000, "random");
    foreach (words[w]) words[w] = M'($urandom | ($urandom & $urandom));
    run_sample(4'b0111, "biased");
    foreach (words[w]) words[w] = M'($urandom);
    words[100] = '0;
    words[101] = '0;
    words[102] = 16'hFF00;
    words[99]  = words[99] & 16'h7FFF;
    run_sample(4'b1000, "long run");
    foreach (words[w]) words[w] = 16'h5555;
    run_sample(4'b0110, "pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
