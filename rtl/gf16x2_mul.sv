// gf16x2_mul: multiplier over the composite field GF(2^4)^2.
//
// With A = a0 + beta*a1, B = b0 + beta*b1 and beta^2 = beta + gamma, the
// product C = c0 + beta*c1 has
//     c0 = a0*b0 + gamma*a1*b1
//     c1 = a0*b1 + a1*b0 + a1*b1 = (a0+a1)*(b0+b1) + a0*b0
// Following the design's structure, three GF(2^4) multipliers form a1*b1,
// a0*b0 and (a0+a1)*(b0+b1) from two GF(2^4) adders; a gamma multiplier
// scales a1*b1, and two more adders produce c0 and c1.  a0*b0 is shared
// by both outputs.
// Ports: a, b, c as {high, low} GF(2^4) pairs.  Purely combinational.
module gf16x2_mul
  import gf_pkg::*;
(
  input  gf16x2_t a,
  input  gf16x2_t b,
  output gf16x2_t c
);
  gf16_t a_sum, b_sum;      // a0+a1, b0+b1
  gf16_t p_hh, p_ll, p_ss;  // a1*b1, a0*b0, (a0+a1)*(b0+b1)
  gf16_t p_hh_g;            // gamma*a1*b1

  gf_add #(.WIDTH(4)) u_add_a (.a(a.lo), .b(a.hi), .s(a_sum));
  gf_add #(.WIDTH(4)) u_add_b (.a(b.lo), .b(b.hi), .s(b_sum));

  gf16_mul u_mul_hh (.a(a.hi),  .b(b.hi),  .p(p_hh));
  gf16_mul u_mul_ll (.a(a.lo),  .b(b.lo),  .p(p_ll));
  gf16_mul u_mul_ss (.a(a_sum), .b(b_sum), .p(p_ss));

  gf16_gamma_mul u_gamma (.z(p_hh), .p(p_hh_g));

  gf_add #(.WIDTH(4)) u_add_c0 (.a(p_hh_g), .b(p_ll), .s(c.lo));
  gf_add #(.WIDTH(4)) u_add_c1 (.a(p_ss),   .b(p_ll), .s(c.hi));
endmodule
