// tb_ring_oscillator: checks the behavioural ring-oscillator model.
//
// Two rings are observed for 4000 periods each: a 3-stage ring (mean period
// must be 3.0 ns within 1.5 %) and a 13-stage ring (10 ns within 1.5 %).  The
// period standard deviation must be near 2 % of the period (between 1.4 % and
// 2.6 %).  With the enable low the ring must hold its output high and not
// toggle; it must run again once enabled.
`timescale 1ps / 1ps
module tb_ring_oscillator;

  logic en3 = 1'b0, en13 = 1'b0;
  logic o3, o13;
  int checks = 0, failures = 0;

  ring_oscillator #(.L(3))  dut3  (.en_i(en3),  .osc_o(o3));
  ring_oscillator #(.L(13)) dut13 (.en_i(en13), .osc_o(o13));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measures n periods on the selected ring; returns mean and std in ps.
  task automatic measure(bit sel13, int n, output real mean, output real sd);
    real t0, t1, s1 = 0.0, s2 = 0.0;
    if (sel13) @(posedge o13); else @(posedge o3);
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      if (sel13) @(posedge o13); else @(posedge o3);
      t1 = $realtime;
      s1 += t1 - t0;
      s2 += (t1 - t0) * (t1 - t0);
      t0 = t1;
    end
    mean = s1 / n;
    sd   = $sqrt(s2 / n - mean * mean);
  endtask

  initial begin
    #(1_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean, sd;
    int toggles;
    // Disabled: output high, no edges.
    #20000;
    check(o3 == 1'b1 && o13 == 1'b1, "disabled ring output not high");
    en3 = 1'b1;
    en13 = 1'b1;
    measure(1'b0, 4000, mean, sd);
    $display("L=3:  mean %0.1f ps, sd %0.1f ps", mean, sd);
    check(mean > 2955.0 && mean < 3045.0, "L=3 mean period not 3.0 ns");
    check(sd > 0.014 * 3000.0 && sd < 0.026 * 3000.0, "L=3 jitter not 2 %");
    measure(1'b1, 4000, mean, sd);
    $display("L=13: mean %0.1f ps, sd %0.1f ps", mean, sd);
    check(mean > 9850.0 && mean < 10150.0, "L=13 mean period not 10 ns");
    check(sd > 0.014 * 10000.0 && sd < 0.026 * 10000.0, "L=13 jitter not 2 %");
    // Disable again: after the edge in flight the output must stay high.
    en3 = 1'b0;
    #5000;
    toggles = 0;
    fork
      begin : count
        forever begin @(o3); toggles++; end
      end
      #100000;
    join_any
    disable count;
    check(toggles == 0 && o3 == 1'b1, "disabled ring still toggles");
    en3 = 1'b1;
    toggles = 0;
    fork
      begin : count2
        forever begin @(o3); toggles++; end
      end
      #30000;
    join_any
    disable count2;
    check(toggles >= 16 && toggles <= 24, $sformatf("re-enabled ring made %0d edges in 30 ns", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
