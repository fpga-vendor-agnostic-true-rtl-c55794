// resilient_postproc: post-processor computing the resilient function
//   (r[i] .. r[i+m-1]) = (s[i] .. s[i+n-1]) * G^T
// for a linear [n,m,d] code with a cyclic generator matrix: row j of G holds
// the generator polynomial g(x) shifted by j places.  Output bit j of a block
// is therefore the XOR of the window s[j] .. s[j+n-m] weighted by g_0..g_{n-m}.
//
// Structure (one input bit per clock, blocks of n bits, no overlap):
//   * an (n-m)-bit serial-in/serial-out shift register receives s[i];
//   * an XOR tree over the taps where g_t = 1 (the incoming bit is tap n-m)
//     forms one output bit per clock;
//   * during the first n-m clocks of a block the register only fills; during
//     the last m clocks the XOR result is shifted into an m-bit
//     serial-in/parallel-out register, which is enabled only then.
// So every n sampled bits yield one m-bit word: compression n/m = 16 and, at
// f_s = 40 MHz, 2.5 Mbit/s.  Words depend only on the bits of their own block,
// so the post-processor is memoryless.  Up to d-1 bits of any block may be
// deterministic without biasing the output (d = 112 for the default code).
//
// Interface: s_i is sampled every clock.  r_valid_o pulses for one clock, one
// clock after the last bit of a block was taken; r_o then holds the word (and
// keeps it for n-m more clocks).  r_o[j] is the j-th output bit of the block
// (first produced bit in bit 0).  Block boundaries are counted from reset.
// Reset (asynchronous, active low) clears the counter and valid flag; the
// block counter and the clock-enable of the output register replace the gated
// clock of the classic drawing (design choice for FPGA clocking).
`timescale 1ps / 1ps
module resilient_postproc #(
  parameter int unsigned       N      = trng_pkg::CODE_N,
  parameter int unsigned       M      = trng_pkg::CODE_M,
  parameter logic [N-M:0]      G_POLY = trng_pkg::G_POLY_256_16
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         s_i,
  output logic [M-1:0] r_o,
  output logic         r_valid_o
);

  localparam int unsigned W  = N - M;        // shift register length
  localparam int unsigned CW = $clog2(N);

  logic [W-1:0]  sr;        // sr[k] = s received k+1 clocks ago
  logic [W:0]    window;    // window[t] multiplies g_t
  logic [CW-1:0] cnt;       // position of s_i within its block
  logic          out_en;    // last m clocks of a block
  logic          r_bit;

  always_comb begin
    window[W] = s_i;
    for (int t = 0; t < W; t++) window[t] = sr[W-1-t];
  end

  assign r_bit  = ^(window & G_POLY);
  assign out_en = (cnt >= CW'(W));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt       <= '0;
      r_valid_o <= 1'b0;
    end else begin
      cnt       <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      r_valid_o <= (cnt == CW'(N - 1));
    end
  end

  // Data registers carry no reset: their contents are only used once a
  // complete block has passed through them.
  always_ff @(posedge clk_i) begin
    sr <= {sr[W-2:0], s_i};
    if (out_en) r_o <= {r_bit, r_o[M-1:1]};
  end

endmodule
