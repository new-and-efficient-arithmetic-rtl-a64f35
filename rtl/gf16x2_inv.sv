// gf16x2_inv: inverse over the composite field GF(2^4)^2.
//
// For X = x0 + beta*x1, solving X*Y = 1 with beta^2 = beta + gamma gives
//     D  = x0*(x0 + x1) + gamma*x1^2
//     y0 = (x0 + x1) / D
//     y1 = x1 / D
// so a GF(2^8) inversion costs one GF(2^4) inversion (of D) and a few
// GF(2^4) multiplications.  The equations are the design's; the grouping
// into gates (x1^2 by a multiplier with tied inputs, one shared 1/D) is
// this RTL's.  X = 0 gives D = 0 and Y = 0.
// Ports: x, y as {high, low} GF(2^4) pairs.  Purely combinational.
module gf16x2_inv
  import gf_pkg::*;
(
  input  gf16x2_t x,
  output gf16x2_t y
);
  gf16_t s;        // x0 + x1
  gf16_t p_0s;     // x0*(x0 + x1)
  gf16_t sq1;      // x1^2
  gf16_t sq1_g;    // gamma*x1^2
  gf16_t d, d_inv;

  gf_add #(.WIDTH(4)) u_add_s (.a(x.lo), .b(x.hi), .s(s));
  gf16_mul            u_mul_0s (.a(x.lo), .b(s), .p(p_0s));
  gf16_mul            u_sq     (.a(x.hi), .b(x.hi), .p(sq1));
  gf16_gamma_mul      u_gamma  (.z(sq1), .p(sq1_g));
  gf_add #(.WIDTH(4)) u_add_d  (.a(p_0s), .b(sq1_g), .s(d));
  gf16_inv            u_inv    (.x(d), .y(d_inv));
  gf16_mul            u_mul_y0 (.a(s),    .b(d_inv), .p(y.lo));
  gf16_mul            u_mul_y1 (.a(x.hi), .b(d_inv), .p(y.hi));
endmodule
