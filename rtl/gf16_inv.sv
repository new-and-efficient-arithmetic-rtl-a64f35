// gf16_inv: inverse over GF(2^4).
//
// Every non-zero x in GF(2^4) has x^15 = 1, so x^-1 = x^14.  The power is
// built with an addition chain x^2, x^3 = x^2*x, x^6 = (x^3)^2,
// x^7 = x^6*x, x^14 = (x^7)^2.  The input 0 gives 0.  The design gives
// only the function of this block; the addition chain is this RTL's choice.
// Ports: x in; y = x^-1 out.  Purely combinational.
module gf16_inv
  import gf_pkg::*;
(
  input  gf16_t x,
  output gf16_t y
);
  gf16_t x2, x3, x6, x7;

  gf16_mul u_sq1 (.a(x),  .b(x),  .p(x2));
  gf16_mul u_m3  (.a(x2), .b(x),  .p(x3));
  gf16_mul u_sq2 (.a(x3), .b(x3), .p(x6));
  gf16_mul u_m7  (.a(x6), .b(x),  .p(x7));
  gf16_mul u_sq3 (.a(x7), .b(x7), .p(y));
endmodule
