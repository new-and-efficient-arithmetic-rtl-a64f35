// gf256_muldiv: GF(2^8) multiplier and divider through the GF(2^4) subfield.
//
// Both operands are converted once to the composite field GF(2^4)^2.  The
// divisor path runs through the composite-field inverter; sel_b picks B
// itself (multiply) or B^-1 (divide) as the second factor of the single
// composite-field multiplier, and one converter returns the product to
// GF(2^8).  Only the two conversions see 8-bit GF(2^8) logic; all
// multiplication and inversion is done on 4-bit subfield elements.
// The converter / inverter / multiplier / converter chain is the design's
// divider; placing the multiply/divide select inside the composite domain,
// so that one conversion serves both operations, is this RTL's reading of
// how the design's ALU shares its multiplier.
// Ports: a, b GF(2^8) operands; sel_b = 1 for a*b, 0 for a/b; y result.
// a/0 gives 0.  Purely combinational.
module gf256_muldiv
  import gf_pkg::*;
(
  input  gf256_t a,
  input  gf256_t b,
  input  logic   sel_b,
  output gf256_t y
);
  gf16x2_t za, zb, zb_inv, zf, zy;

  gf256_to_gf16 u_cnv_a (.b(a), .z(za));
  gf256_to_gf16 u_cnv_b (.b(b), .z(zb));
  gf16x2_inv    u_inv   (.x(zb), .y(zb_inv));

  assign zf = sel_b ? zb : zb_inv;

  gf16x2_mul    u_mul   (.a(za), .b(zf), .c(zy));
  gf16_to_gf256 u_cnv_y (.z(zy), .b(y));
endmodule
