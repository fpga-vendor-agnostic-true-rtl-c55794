// tb_trng_ref_pkg: reference arithmetic for the TRNG testbenches.
//
// derive_gpoly() rebuilds the post-processor's generator polynomial from its
// definition, g(x) = (x+1) * (x^255+1) / (m1(x)*m3(x)) with m1 = 0x11D and
// m3 = 0x177, by carry-less multiplication and long division over GF(2).
// resilient() applies the generator matrix of the [256,16] code directly,
// r_j = XOR_t g_t * s_{j+t}, to one block of 256 sampled bits (bit i of the
// block vector is the i-th sampled bit).  Neither reuses the RTL.
`timescale 1ps / 1ps
package tb_trng_ref_pkg;

  localparam int unsigned RN = 256;
  localparam int unsigned RM = 16;

  typedef logic [RN:0] poly_t;   // degree up to 256

  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t r = '0;
    for (int i = 0; i <= RN; i++) if (b[i]) r ^= (a << i);
    return r;
  endfunction

  function automatic int deg(poly_t a);
    for (int i = RN; i >= 0; i--) if (a[i]) return i;
    return -1;
  endfunction

  function automatic poly_t pdiv(poly_t a, poly_t b, output poly_t rem);
    poly_t q = '0;
    int db = deg(b);
    while (deg(a) >= db) begin
      int s = deg(a) - db;
      q[s] = 1'b1;
      a ^= (b << s);
    end
    rem = a;
    return q;
  endfunction

  function automatic logic [RN-RM:0] derive_gpoly();
    poly_t h, q, rem, x255;
    h    = pmul(poly_t'(9'h11D), poly_t'(9'h177));
    x255 = '0;
    x255[255] = 1'b1;
    x255[0]   = 1'b1;
    q = pdiv(x255, h, rem);
    if (rem != '0) $error("m1*m3 does not divide x^255+1");
    return (RN-RM+1)'(pmul(q, poly_t'(3)));
  endfunction

  function automatic logic [RM-1:0] resilient(logic [RN-1:0] blk, logic [RN-RM:0] g);
    logic [RM-1:0] r;
    for (int j = 0; j < RM; j++) begin
      r[j] = 1'b0;
      for (int t = 0; t <= RN - RM; t++) r[j] ^= g[t] & blk[j+t];
    end
    return r;
  endfunction

endpackage
