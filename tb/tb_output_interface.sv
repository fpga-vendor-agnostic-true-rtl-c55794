// tb_output_interface: random traffic against a cycle model of the one-word
// output stage.  Words arrive at random, the reader is ready at random and
// the alarm is raised now and then.  Each clock the model predicts data,
// valid and the overflow pulse; every word handed over must be one that was
// offered, in order and never twice.  Overflows and alarm flushes must both
// occur.
`timescale 1ps / 1ps
module tb_output_interface;

  localparam int unsigned M = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] r = '0, data;
  logic r_valid = 1'b0, alarm = 1'b0, ready = 1'b0, valid, ovf;
  int checks = 0, failures = 0;

  // model state
  logic [M-1:0] m_data = '0;
  logic m_valid = 1'b0, m_ovf = 1'b0;
  int n_ovf = 0, n_flush = 0, n_taken = 0;
  int last_taken = -1;

  always #12500 clk = ~clk;

  output_interface #(.M(M)) dut (
    .clk_i(clk), .rst_ni(rst_n), .r_i(r), .r_valid_i(r_valid), .alarm_i(alarm),
    .data_o(data), .valid_o(valid), .ready_i(ready), .ovf_o(ovf));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(1_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // drive inputs for this cycle
      r_valid = ($urandom % 4) == 0;
      if (r_valid) begin seq++; r = M'(seq); end
      ready   = ($urandom % 8) < 3;
      alarm   = ($urandom % 64) == 0;
      #1;
      // model the clock edge
      begin
        automatic bit take = m_valid && ready;
        if (take) begin
          check(int'(m_data) > last_taken, "word taken out of order or twice");
          last_taken = int'(m_data);
          n_taken++;
        end
        m_ovf = r_valid && !alarm && m_valid && !take;
        if (m_ovf) n_ovf++;
        if (alarm) begin
          if (m_valid) n_flush++;
          m_valid = 1'b0;
        end else if (r_valid && (!m_valid || take)) begin
          m_valid = 1'b1;
          m_data  = r;
        end else if (take) m_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      check(valid == m_valid, $sformatf("cycle %0d: valid %b expected %b", i, valid, m_valid));
      if (m_valid) check(data == m_data, $sformatf("cycle %0d: data %h expected %h", i, data, m_data));
      check(ovf == m_ovf, $sformatf("cycle %0d: ovf %b expected %b", i, ovf, m_ovf));
    end
    check(n_ovf > 10 && n_flush > 3 && n_taken > 300,
          $sformatf("coverage: %0d overflows, %0d flushes, %0d taken", n_ovf, n_flush, n_taken));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
