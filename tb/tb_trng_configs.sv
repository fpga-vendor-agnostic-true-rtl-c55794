// tb_trng_configs: the three noise-source configurations of the generator,
// each driving its own digitizer and post-processor at 40 MHz:
//   minimal   - 110 rings of 3 stages (the default),
//   reference - 110 rings of 13 stages,
//   robust    - 210 rings of 3 stages.
// For each, 10 blocks of raw bits are recorded; every word must equal the
// generator-matrix product of its block and arrive every 256 clocks, and the
// raw stream must be neither stuck nor grossly biased (ones between 30 % and
// 70 %).
`timescale 1ps / 1ps
module tb_trng_configs;
  import tb_trng_ref_pkg::*;

  localparam int unsigned N = 256, M = 16, NCFG = 3, NBLK = 10;
  localparam int unsigned CFG_K[NCFG] = '{110, 110, 210};
  localparam int unsigned CFG_L[NCFG] = '{3, 13, 3};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  int checks = 0, failures = 0;
  logic [N-M:0] g;
  int words_seen[NCFG];

  always #12500 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic n, s, r_valid;
    logic [M-1:0] r;
    logic [N-1:0] cur;
    logic [M-1:0] expected[$];
    int nbit = 0, ones = 0, total = 0, words = 0;
    longint cycle = 0, last = -1;

    noise_source #(.K(CFG_K[c]), .L(CFG_L[c])) u_noise (.en_i(en), .n_o(n));
    digitizer u_dig (.clk_i(clk), .rst_ni(rst_n), .n_i(n), .s_o(s));
    resilient_postproc u_post (.clk_i(clk), .rst_ni(rst_n), .s_i(s), .r_o(r), .r_valid_o(r_valid));

    always @(posedge clk) if (rst_n) begin
      cycle <= cycle + 1;
      cur[nbit] = s;
      ones += int'(s);
      total++;
      nbit++;
      if (nbit == N) begin expected.push_back(resilient(cur, g)); nbit = 0; end
      if (r_valid) begin
        check(words < expected.size() && r == expected[words],
              $sformatf("config %0d word %0d mismatch", c, words));
        if (last >= 0) check(cycle - last == longint'(N), $sformatf("config %0d spacing %0d", c, cycle - last));
        last = cycle;
        words++;
        words_seen[c] = words;
      end
    end
  end

  initial begin
    #(longint'(25000) * 100_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g = derive_gpoly();
    en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (NBLK * N + 4) @(negedge clk);
    check(words_seen[0] == NBLK && words_seen[1] == NBLK && words_seen[2] == NBLK,
          $sformatf("words: %0d %0d %0d", words_seen[0], words_seen[1], words_seen[2]));
    check(g_cfg[0].ones * 10 > g_cfg[0].total * 3 && g_cfg[0].ones * 10 < g_cfg[0].total * 7, "minimal: raw bits biased");
    check(g_cfg[1].ones * 10 > g_cfg[1].total * 3 && g_cfg[1].ones * 10 < g_cfg[1].total * 7, "reference: raw bits biased");
    check(g_cfg[2].ones * 10 > g_cfg[2].total * 3 && g_cfg[2].ones * 10 < g_cfg[2].total * 7, "robust: raw bits biased");
    $display("raw ones: minimal %0d/%0d, reference %0d/%0d, robust %0d/%0d",
             g_cfg[0].ones, g_cfg[0].total, g_cfg[1].ones, g_cfg[1].total, g_cfg[2].ones, g_cfg[2].total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
