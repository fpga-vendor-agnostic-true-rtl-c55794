// noise_source: k identical ring oscillators combined by exclusive-or into the
// noise signal n(t).
//
// Every ring has the same length L (identical lengths are used on purpose:
// relatively prime lengths give no better randomness).  The XOR of the k ring
// outputs has, with enough rings, a jittered transition somewhere in most of
// each sampling interval; the fraction of the spectrum covered by jitter is the
// fill rate f.  With 2 % jitter per period, k = 110 gives f >= 0.60 with 99 %
// confidence, which the post-processor then compensates.
//
// Interface: en_i enables all rings at once (NAND input of each ring);
// n_o is the asynchronous noise signal, to be sampled by the digitizer.
// There is no clock: n_o changes whenever any ring toggles.
//
// The rings are the behavioural model ring_oscillator; the XOR combiner is
// plain logic.  K and L default to the minimal configuration (110 rings of 3
// stages).  In hardware each ring must be kept apart by placement constraints;
// rings placed close together tend to lock in phase.
`timescale 1ps / 1ps
module noise_source #(
  parameter int unsigned K               = 110,
  parameter int unsigned L               = 3,
  parameter int unsigned JITTER_PERMIL   = 20,
  parameter int unsigned MISMATCH_PERMIL = 10
) (
  input  logic en_i,
  output logic n_o
);

  logic [K-1:0] ring;

  for (genvar i = 0; i < K; i++) begin : g_ring
    ring_oscillator #(
      .L              (L),
      .JITTER_PERMIL  (JITTER_PERMIL),
      .MISMATCH_PERMIL(MISMATCH_PERMIL)
    ) u_ro (
      .en_i (en_i),
      .osc_o(ring[i])
    );
  end

  assign n_o = ^ring;

endmodule
