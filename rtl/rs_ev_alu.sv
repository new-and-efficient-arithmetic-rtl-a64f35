// rs_ev_alu: arithmetic unit that evaluates Reed-Solomon error values.
//
// Once the error locations are known, each error value is a ratio of sums
// of products of syndromes and location powers over GF(2^8).  This ALU
// provides exactly those three operations; a controller sequences them.
//
//   op (S[1:0])   y
//   00            a / b   (flag = 1 when b = 0; y is then 0)
//   01            a * b
//   10, 11        a + b   (bitwise XOR)
//
// S1 selects between the adder and the multiplier output; S0 selects
// whether the multiplier sees b or b^-1.  Multiplication and inversion run
// in the composite field GF(2^4)^2 (gf256_muldiv).  The opcode table and
// the two-mux structure follow the design; the meaning of flag is this
// RTL's choice, as the design prints the output without defining it.
// Ports: a, b, y are GF(2^8) elements in the polynomial basis of alpha
// (x^8 + x^4 + x^3 + x^2 + 1).  The unit is combinational: y and flag
// follow the inputs with no clock and no latency in cycles.
module rs_ev_alu
  import gf_pkg::*;
#(
  parameter int unsigned M = 8  // symbol width; the datapath is built for GF(2^8)
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [1:0]   op,
  output logic [M-1:0] y,
  output logic         flag
);
  gf256_t y_add, y_md;

  if (M != 8) begin : g_bad_m
    $error("rs_ev_alu: only M = 8 is supported");
  end

  gf_add #(.WIDTH(8)) u_add (.a(a), .b(b), .s(y_add));
  gf256_muldiv        u_md  (.a(a), .b(b), .sel_b(op[0]), .y(y_md));

  assign y    = op[1] ? y_add : y_md;
  assign flag = (alu_op_e'(op) == OP_DIV) && (b == '0);
endmodule
