// gf_add: adder over GF(2^WIDTH).
//
// Addition in a field of characteristic 2 is a bitwise exclusive OR with
// no carries.  WIDTH = 8 gives the ALU's GF(2^8) adder; WIDTH = 4 gives
// the GF(2^4) adders inside the composite-field multiplier.
// Ports: a, b operands; s = a + b.  Purely combinational.
module gf_add #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);
  assign s = a ^ b;
endmodule
