// ring_oscillator: BEHAVIOURAL MODEL (simulation only) of one free-running
// ring oscillator of L inverting stages, one of which is a NAND gate whose
// second input is the enable.
//
// A real ring is a combinational loop whose period is set by the gate delays
// of the FPGA and whose edges carry random timing jitter; that cannot be
// written as synthesizable RTL, so this model reproduces its observable
// behaviour with delays instead.  In an FPGA the ring is placed by hand (or by
// a vendor-neutral netlist of one NAND, L-1 inverters and, for some tools, a
// transparent latch to break the loop for timing analysis).
//
// Behaviour:
//   * en_i = 1: osc_o toggles every half period.  The mean period is
//     PERIOD_PS (measured 3.0 ns for L = 3, see trng_pkg::ring_period_ps),
//     scaled per instance by a static mismatch drawn uniformly within
//     +/-MISMATCH_PERMIL per mille (placement-dependent variation: a design
//     choice of this model).  Each half period adds Gaussian jitter (sum of
//     twelve uniform samples) such that the period has a standard deviation
//     of JITTER_PERMIL per mille of the period (2 % by default, the jitter
//     assumed for the target FPGA).
//   * en_i = 0: the NAND output, which is the observed node, is forced high
//     and the ring stops.  Oscillation resumes half a period after en_i rises.
//   * The first edge after start-up is delayed by a random phase so that the
//     rings of a noise source do not start in step.
`timescale 1ps / 1ps
module ring_oscillator #(
  parameter int unsigned L               = 3,
  parameter int unsigned PERIOD_PS       = trng_pkg::ring_period_ps(L),
  parameter int unsigned JITTER_PERMIL   = 20,
  parameter int unsigned MISMATCH_PERMIL = 10
) (
  input  logic en_i,   // 1: ring runs, 0: ring held (NAND input)
  output logic osc_o   // ring output (NAND output node)
);

  // Timing arithmetic is done in femtoseconds with integers.
  longint half_fs;        // this instance's mean half period
  longint sigma_half_fs;  // jitter standard deviation per half period

  // Approximately standard-normal sample times 1000: the sum of twelve
  // uniform samples of 0..999 has mean 5994 and standard deviation 1000.
  function automatic longint gauss_milli();
    int unsigned acc = 0;
    for (int i = 0; i < 12; i++) acc += $urandom % 1000;
    return longint'(acc) - 5994;
  endfunction

  function automatic longint next_delay();
    longint d = (half_fs + sigma_half_fs * gauss_milli() / 1000) / 1000;
    return (d < 1) ? 1 : d;
  endfunction

  initial begin
    longint mis;
    mis           = longint'(32'($urandom % (2 * MISMATCH_PERMIL + 1))) - longint'(MISMATCH_PERMIL);
    half_fs       = longint'(PERIOD_PS) * (1000 + mis) / 2;
    // period jitter sigma = JITTER * T; each period has two independent
    // halves, so each half gets sigma / sqrt(2) (0.7071)
    sigma_half_fs = longint'(PERIOD_PS) * longint'(JITTER_PERMIL) * 7071 / 10000;
    osc_o         = 1'b1;
    // random start-up phase within one period
    #(1 + longint'($urandom) % longint'(PERIOD_PS));
    forever begin
      if (!en_i) begin
        osc_o = 1'b1;
        wait (en_i);
      end
      #(next_delay());
      if (en_i) osc_o = ~osc_o;
      else      osc_o = 1'b1;
    end
  end

endmodule
