// gf16_gamma_mul: multiplies a GF(2^4) element by the constant gamma.
//
// gamma is the generator of the GF(2^4) basis, so multiplying by it shifts
// every coefficient up one place; the coefficient leaving gamma^3 becomes
// gamma^4 = gamma^3 + 1 and folds back into bits 0 and 3.  Written as a
// product with the constant GAMMA, this reduces to one XOR gate.
// Ports: z in; p = gamma*z out.  Purely combinational.
module gf16_gamma_mul
  import gf_pkg::*;
(
  input  gf16_t z,
  output gf16_t p
);
  assign p = gf16_mul_f(z, GAMMA);
endmodule
