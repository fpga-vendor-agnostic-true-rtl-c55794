// trng_pkg: constants shared by the ring-oscillator TRNG.
//
// The generator is built from k identical ring oscillators whose outputs are
// XORed and sampled at f_s = 40 MHz; the sampled bits are compressed by a
// resilient function derived from a binary [256,16] linear code with a cyclic
// (sliding-window) generator matrix.  This package holds the code sizes, the
// generator polynomial of that code, and the measured ring-oscillator periods
// used by the behavioural ring model.
//
// Generator polynomial (design choice, the coefficients of the original code
// are not published with the design):
//   g(x) = (x + 1) * (x^255 + 1) / (m1(x) * m3(x))
// where m1(x) = x^8+x^4+x^3+x^2+1 (0x11D) and m3(x) = x^8+x^6+x^5+x^4+x^2+x+1
// (0x177) are the minimal polynomials of alpha and alpha^3 in GF(2^8) built on
// 0x11D.  (x^255+1)/(m1*m3) generates the cyclic [255,16,112] code (dual of the
// double-error-correcting BCH code); multiplying by (x+1) gives degree 240,
// i.e. a [256,16] polynomial code whose minimum distance is also 112.  The
// resilient function therefore tolerates up to 111 deterministic bits in each
// 256-bit block; at fill rate 0.60 about 103 are expected.
// Bit t of G_POLY_256_16 is the coefficient g_t of x^t.
`timescale 1ps / 1ps
package trng_pkg;

  // Code length n and dimension m of the post-processing code.
  localparam int unsigned CODE_N = 256;
  localparam int unsigned CODE_M = 16;

  localparam logic [CODE_N-CODE_M:0] G_POLY_256_16 =
    241'h1c38e51aa78b843902ddd90e141dcd06f3b5efeeb0fc74d1c06e7e24aa121;

  // Ring-oscillator period in ps for a ring of l stages.  Lengths measured on
  // the target FPGA use the measured value; other lengths use the linear fit
  // T[ns] = 0.88 * l - 0.23.
  function automatic int unsigned ring_period_ps(int unsigned l);
    case (l)
      1:   return 2_700;
      3:   return 3_000;
      5:   return 5_000;
      7:   return 6_600;
      9:   return 7_500;
      13:  return 10_000;
      19:  return 15_000;
      25:  return 20_000;
      31:  return 25_000;
      41:  return 38_000;
      57:  return 51_000;
      67:  return 58_000;
      83:  return 72_000;
      101: return 90_000;
      default: return (880 * l > 230) ? 880 * l - 230 : 1;
    endcase
  endfunction

endpackage
