// gf16_to_gf256: converts a composite-field element back to GF(2^8).
//
// The inverse of gf256_to_gf16: a fixed XOR network taking Z = {A1, A0}
// to the polynomial basis of GF(2^8).  The eight parity equations are the
// design's.
// Ports: z = {A1, A0} in, b (bit i = alpha^i) out.  Purely combinational.
module gf16_to_gf256
  import gf_pkg::*;
(
  input  gf16x2_t z,
  output gf256_t  b
);
  logic [7:0] zz;
  assign zz = z;  // Z0..Z7 as one vector

  always_comb begin
    b[0] = zz[0] ^ zz[1] ^ zz[2] ^ zz[6] ^ zz[7];
    b[1] = zz[1] ^ zz[2] ^ zz[5];
    b[2] = zz[5] ^ zz[3] ^ zz[7];
    b[3] = zz[2] ^ zz[7] ^ zz[6];
    b[4] = zz[1] ^ zz[7];
    b[5] = zz[7] ^ zz[5] ^ zz[6];
    b[6] = zz[3] ^ zz[5] ^ zz[6];
    b[7] = zz[1] ^ zz[6] ^ zz[4] ^ zz[7];
  end
endmodule
