// tb_noise_source: checks the XOR combination of k rings.
//
// A small source of 7 rings is watched for 2 us: at every change of any ring
// output the noise signal must equal the XOR of the ring outputs (read through
// the ring instances), the noise signal must toggle as often as the rings do
// together, and with the rings disabled it must sit at the XOR of seven ones.
`timescale 1ps / 1ps
module tb_noise_source;

  localparam int unsigned K = 7;

  logic en = 1'b0;
  logic n;
  logic [K-1:0] rings;
  int checks = 0, failures = 0;
  int ring_edges = 0, n_edges = 0;

  noise_source #(.K(K), .L(3)) dut (.en_i(en), .n_o(n));

  for (genvar i = 0; i < K; i++) begin : g_tap
    assign rings[i] = dut.g_ring[i].u_ro.osc_o;
    always @(dut.g_ring[i].u_ro.osc_o) if (en) ring_edges++;
  end

  always @(n) if (en) n_edges++;

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
    int errs = 0;
    int samples = 0;
    #10000;
    check(n == 1'b1, "disabled source: n is not the XOR of seven ones");
    en = 1'b1;
    fork
      begin : watch
        forever begin
          @(rings);
          #1;
          samples++;
          if (n != ^rings) errs++;
        end
      end
      #2_000_000;
    join_any
    disable watch;
    check(samples > 1000, $sformatf("only %0d ring events", samples));
    check(errs == 0, $sformatf("%0d mismatches between n and XOR of rings", errs));
    check(n_edges > 0 && n_edges <= ring_edges && n_edges > ring_edges * 9 / 10,
          $sformatf("n toggled %0d times for %0d ring edges", n_edges, ring_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
