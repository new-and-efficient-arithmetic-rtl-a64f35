// gf16_mul: multiplier over GF(2^4).
//
// Computes p = a*b in GF(2^4) generated by gamma^4 = gamma^3 + 1, bit i
// being the coefficient of gamma^i.  The design only names this block;
// its insides here are the plain shift-and-add product, reducing the
// partial multiplicand each time it is shifted past gamma^3.
// Ports: a, b in; p out.  Purely combinational.
module gf16_mul
  import gf_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t p
);
  assign p = gf16_mul_f(a, b);
endmodule
