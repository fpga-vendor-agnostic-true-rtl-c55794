// tb_digitizer: the digitizer must present at s the value n had at the
// previous rising clock edge, and 0 during reset.  n is driven with random
// values at random times between edges.
`timescale 1ps / 1ps
module tb_digitizer;

  logic clk = 1'b0, rst_n = 1'b0, n = 1'b1, s;
  logic n_at_edge;
  int checks = 0, failures = 0;

  always #12500 clk = ~clk;

  digitizer dut (.clk_i(clk), .rst_ni(rst_n), .n_i(n), .s_o(s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    check(s == 1'b0, "s not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      n_at_edge = n;
      #(1 + $urandom % 20000);
      n = 1'($urandom);
      check(s == n_at_edge, $sformatf("cycle %0d: s=%b, n at edge=%b", i, s, n_at_edge));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
