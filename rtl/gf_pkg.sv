// gf_pkg: types and constants shared by the Reed-Solomon error-value ALU.
//
// Elements of GF(2^8) are 8-bit vectors in the polynomial basis of alpha,
// bit i being the coefficient of alpha^i, with the field generated by
// x^8 + x^4 + x^3 + x^2 + 1.  Internally the ALU works in the composite
// field GF(2^4)^2: an element is A0 + beta*A1 with A0, A1 in GF(2^4),
// beta^2 = beta + gamma, and GF(2^4) generated by gamma^4 = gamma^3 + 1.
// A composite element travels as an 8-bit vector {A1, A0}.
//
// The composite-field construction, the conversion equations and the
// opcode table come from the design; the two generator polynomials are
// not named there and were derived as the only ones that make the given
// conversion equations a field isomorphism.
package gf_pkg;

  typedef logic [7:0] gf256_t;
  typedef logic [3:0] gf16_t;

  // An element of GF(2^4)^2, A0 + beta*A1.
  typedef struct packed {
    gf16_t hi;  // A1, coefficient of beta
    gf16_t lo;  // A0
  } gf16x2_t;

  // ALU opcode S[1:0].  Codes 10 and 11 both add.
  typedef enum logic [1:0] {
    OP_DIV  = 2'b00,
    OP_MUL  = 2'b01,
    OP_ADD  = 2'b10,
    OP_ADD2 = 2'b11
  } alu_op_e;

  // x^4 + x^3 + 1, low four bits (reduction of gamma^4).
  localparam gf16_t GF16_RED = 4'b1001;
  // The constant gamma in beta^2 = beta + gamma.
  localparam gf16_t GAMMA = 4'b0010;

  // Product in GF(2^4): carry-less multiply, reducing on every shift.
  function automatic gf16_t gf16_mul_f(gf16_t a, gf16_t b);
    gf16_t acc = '0;
    gf16_t sh  = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[3] ? ({sh[2:0], 1'b0} ^ GF16_RED) : {sh[2:0], 1'b0};
    end
    return acc;
  endfunction

endpackage
