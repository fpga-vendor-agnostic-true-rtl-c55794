// digitizer: samples the asynchronous noise signal n(t) with one D-type
// flip-flop clocked at the sampling frequency f_s, producing the das-random
// bit stream s[i] (one bit per clock).
//
// A single flip-flop is what the design calls for: sampling inside a jittered
// transition is the very source of randomness, so the flip-flop is expected to
// go metastable at times; it resolves within the 25 ns clock period at 40 MHz
// before the post-processor uses the bit.  The asynchronous active-low reset
// (clearing s to 0) is this implementation's choice.
//
// Interface: clk_i = f_s, n_i = noise signal, s_o = sampled bit, valid every
// cycle; latency one clock.
`timescale 1ps / 1ps
module digitizer (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic n_i,
  output logic s_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) s_o <= 1'b0;
    else         s_o <= n_i;
  end

endmodule
