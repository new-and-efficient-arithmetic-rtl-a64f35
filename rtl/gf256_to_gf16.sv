// gf256_to_gf16: converts a GF(2^8) element to the composite field GF(2^4)^2.
//
// The map is linear over GF(2), so it is a fixed XOR network: each output
// bit Z_k is the parity of a set of input bits b_i.  The eight parity
// equations are those of the design; Z[3:0] is the low half A0 and Z[7:4]
// the coefficient A1 of beta.  The map preserves sums and products, so an
// operation can be carried out in either field.
// Ports: b (polynomial basis, bit i = alpha^i) in, z = {A1, A0} out.
// Purely combinational.
module gf256_to_gf16
  import gf_pkg::*;
(
  input  gf256_t  b,
  output gf16x2_t z
);
  always_comb begin
    z.lo[0] = b[0] ^ b[1] ^ b[5];
    z.lo[1] = b[1] ^ b[3] ^ b[5];
    z.lo[2] = b[2] ^ b[3] ^ b[6];
    z.lo[3] = b[1] ^ b[3] ^ b[4] ^ b[6];
    z.hi[0] = b[1] ^ b[2] ^ b[3] ^ b[5] ^ b[6] ^ b[7];
    z.hi[1] = b[2] ^ b[5] ^ b[6];
    z.hi[2] = b[1] ^ b[2] ^ b[3] ^ b[4] ^ b[5] ^ b[6];
    z.hi[3] = b[1] ^ b[3] ^ b[4] ^ b[5];
  end
endmodule
