// tb_resilient_postproc: self-checking test of the resilient-function
// post-processor at its full size (n = 256, m = 16).
//
// * The generator polynomial is rebuilt from its definition and compared with
//   the RTL default; its code is enumerated (all 65 535 non-zero messages) to
//   confirm minimum distance 112, i.e. 111 deterministic bits are tolerated.
// * Random sampled bits are fed one per clock; every output word is compared
//   with the generator-matrix product of its block, and the valid pulse must
//   come exactly every 256 clocks, one clock after the block's last bit.
// * Blocks with 111 bits forced to constants at random positions are fed with
//   two different fillings of the free bits: the output words must differ for
//   some fillings (the fixed bits do not determine the word).
`timescale 1ps / 1ps
module tb_resilient_postproc;
  import tb_trng_ref_pkg::*;

  localparam int unsigned N = 256, M = 16;

  logic clk = 1'b0, rst_n = 1'b0, s = 1'b0;
  logic [M-1:0] r;
  logic r_valid;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #12500 clk = ~clk;
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  resilient_postproc dut (.clk_i(clk), .rst_ni(rst_n), .s_i(s), .r_o(r), .r_valid_o(r_valid));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-M:0] g;
  logic [N-1:0] blocks[$];
  logic [N-1:0] cur;
  int nbit = 0;
  longint last_valid = -1;
  int nwords = 0;
  logic [M-1:0] exp_r;

  // Record what the DUT samples: the s value at each rising edge after reset.
  always @(posedge clk) if (rst_n) begin
    cur[nbit] = s;
    nbit++;
    if (nbit == N) begin blocks.push_back(cur); nbit = 0; end
  end

  // Compare each output word with the reference.
  always @(posedge clk) if (rst_n && r_valid) begin
    check(blocks.size() > nwords, "word before its block was complete");
    if (blocks.size() > nwords) begin
      exp_r = resilient(blocks[nwords], g);
      check(r == exp_r, $sformatf("word %0d: got %h expected %h", nwords, r, exp_r));
    end
    if (last_valid >= 0) check(cycle - last_valid == longint'(N), $sformatf("valid spacing %0d", cycle - last_valid));
    else                 check(cycle == longint'(N), $sformatf("first valid at edge %0d", cycle));
    last_valid = cycle;
    nwords++;
  end

  function automatic int min_distance(logic [N-M:0] gp);
    logic [N-1:0] cw = '0;
    int best = N;
    int unsigned prev = 0;
    for (int unsigned i = 1; i < (1 << M); i++) begin
      int unsigned gray = i ^ (i >> 1);
      int unsigned diff = gray ^ prev;
      int b = 0;
      while (!diff[b]) b++;
      prev = gray;
      cw ^= N'(gp) << b;
      if ($countones(cw) < best) best = $countones(cw);
    end
    return best;
  endfunction

  initial begin
    #(25000 * 40000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] fixmask, fixval;
    logic [M-1:0] wa, wb;
    int differ;
    g = derive_gpoly();
    check(g == trng_pkg::G_POLY_256_16, "generator polynomial differs from its definition");
    check(g[0] && g[N-M], "generator polynomial is not of degree n-m with g0 = 1");
    check(min_distance(g) == 112, "minimum distance of the code is not 112");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 12 blocks of uniform random bits, plus special blocks: all zero, all one.
    for (int b = 0; b < 14; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        s = (b == 12) ? 1'b0 : (b == 13) ? 1'b1 : 1'($urandom);
      end
    // Let the last word come out.
    repeat (3) @(negedge clk);
    check(nwords == 14, $sformatf("%0d words out of 14 blocks", nwords));

    // Resilience: with 111 bits fixed, the remaining 145 free bits still
    // change the word.
    differ = 0;
    for (int trial = 0; trial < 20; trial++) begin
      automatic int nfix = 0;
      fixmask = '0;
      while (nfix < 111) begin
        automatic int p = int'($urandom % N);
        if (!fixmask[p]) begin fixmask[p] = 1'b1; nfix++; end
      end
      for (int i = 0; i < N; i += 32) fixval[i +: 32] = $urandom;
      wa = resilient((fixval & fixmask) | ({8{$urandom}} & ~fixmask), g);
      wb = resilient((fixval & fixmask) | ({8{$urandom}} & ~fixmask), g);
      if (wa != wb) differ++;
    end
    check(differ >= 15, "fixed bits determine the output word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
