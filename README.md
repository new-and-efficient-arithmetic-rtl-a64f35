# Subfield ALU for Reed-Solomon error values over GF(2^8)

A Reed-Solomon decoder first finds *where* the symbol errors are (for
example with a Chien search). Finding *how large* they are is a different
problem, and a linear one. With the error locations X_k = alpha^(j_k) known,
the syndromes S_i = E(alpha^i) give a Vandermonde system:

    S_0     = E_1          + E_2          + ... 
    S_1     = E_1 X_1      + E_2 X_2      + ...
    ...
    S_(t-1) = E_1 X_1^(t-1) + ...

Solving it needs only three operations in GF(2^8): addition, multiplication
and division. This RTL is a small arithmetic unit that does exactly those
three, chosen by a 2-bit opcode, under a controller that sequences them.
Most of its area is in the divider. The unit does not divide in GF(2^8)
directly. It maps both operands into the composite field GF(2^4)^2, inverts
and multiplies there on 4-bit subfield elements, and maps the result back.
That is much smaller than a GF(2^8) inverter and has a shorter critical
path.

Everything is combinational. There is no clock, no reset and no state.

## The operation

`rs_ev_alu` (top):

| `op` (S[1:0]) | `y`      | `flag`        |
|---------------|----------|---------------|
| `00`          | `a / b`  | 1 if `b == 0` |
| `01`          | `a * b`  | 0             |
| `10`          | `a + b`  | 0             |
| `11`          | `a + b`  | 0             |

`a`, `b` and `y` are 8-bit GF(2^8) elements in the polynomial basis of
alpha. Bit i is the coefficient of alpha^i, and the field is generated by
x^8 + x^4 + x^3 + x^2 + 1 (the polynomial of the CD-player RS(32,28) code).
Addition is a bitwise XOR. Division by zero returns `y = 0` and raises
`flag`.

The datapath has two 2:1 multiplexers:

```
a, b ─► XOR ───────────────────────────────────────────────► S1 mux in 1 ─► y
a    ─► to GF(2^4)^2 ─────────────────────────┐
b    ─► to GF(2^4)^2 ─┬──────────► S0 in 1 ─┐ │
                      └─► inverse ─► S0 in 0 ┴► multiply ─► to GF(2^8) ─► S1 mux in 0
```

- S0 (`op[0]`) picks the multiplier's second operand: `b` when it is 1,
  `b^-1` when it is 0.
- S1 (`op[1]`) picks the adder when it is 1, and the multiplier when it
  is 0.

So opcode `00` means "multiply by the inverse", `01` means "multiply", and
`1x` means "add".

## The composite field GF(2^4)^2

This is the part that needs the most explanation.

**Representation.** GF(2^4) is generated by gamma with gamma^4 = gamma^3 + 1.
A 4-bit vector (z0, z1, z2, z3) stands for z0 + z1 gamma + z2 gamma^2 +
z3 gamma^3. GF(2^8) is then built as a degree-2 extension: an element is
A = A0 + beta A1, with A0 and A1 in GF(2^4) and beta^2 = beta + gamma. On a
bus it travels as `{A1, A0}`, with A1 in bits [7:4]. `gf_pkg::gf16x2_t`
gives the two halves the names `hi` and `lo`.

**Conversion** (`gf256_to_gf16`, `gf16_to_gf256`). The map between the two
representations is linear over GF(2), so each direction is a fixed XOR
network, one parity equation per output bit:

    Z0 = b0+b1+b5           b0 = Z0+Z1+Z2+Z6+Z7
    Z1 = b1+b3+b5           b1 = Z1+Z2+Z5
    Z2 = b2+b3+b6           b2 = Z3+Z5+Z7
    Z3 = b1+b3+b4+b6        b3 = Z2+Z6+Z7
    Z4 = b1+b2+b3+b5+b6+b7  b4 = Z1+Z7
    Z5 = b2+b5+b6           b5 = Z5+Z6+Z7
    Z6 = b1+b2+b3+b4+b5+b6  b6 = Z3+Z5+Z6
    Z7 = b1+b3+b4+b5        b7 = Z1+Z4+Z6+Z7

These two maps are exact inverses. They preserve sums and products, so a
computation can be done in either field. The published equations do not name
the field polynomials. The polynomials above were found by testing every
candidate: x^8+x^4+x^3+x^2+1, gamma^4 = gamma^3+1 and beta^2 = beta+gamma
are the only choice that makes these equations a field isomorphism. The
testbenches check this property exhaustively.

**Multiplication** (`gf16x2_mul`). Expanding (a0 + beta a1)(b0 + beta b1)
and replacing beta^2 with beta + gamma gives

    c0 = a0 b0 + gamma a1 b1
    c1 = a0 b1 + a1 b0 + a1 b1 = (a0+a1)(b0+b1) + a0 b0

This needs three GF(2^4) multipliers (`gf16_mul`), four 4-bit adders
(`gf_add #(4)`) and one multiply-by-gamma (`gf16_gamma_mul`). Multiplying
by gamma is just a rotation plus one XOR, because gamma^4 = 1 + gamma^3.
The product a0 b0 is shared between c0 and c1.

**Inversion** (`gf16x2_inv`). Solving X Y = 1 for X = x0 + beta x1 gives

    D  = x0 (x0 + x1) + gamma x1^2
    y0 = (x0 + x1) / D
    y1 = x1 / D

So an 8-bit inversion costs one 4-bit inversion (`gf16_inv`, which
computes D^14 = D^-1 with the chain x^2, x^3, x^6, x^7, x^14) plus a few
4-bit multiplications. X = 0 gives D = 0 and hence Y = 0. That is where the
zero result of a division by zero comes from.

**Worked example.** alpha^3 / alpha^5 in GF(2^8). Below, a is gamma, the
generator of GF(2^4).

- alpha^5 maps to a^12 + a^6 beta, and alpha^3 maps to a^8 + a^11 beta.
- The inverse of a^12 + a^6 beta is a^9 + a beta.
- (a^8 + a^11 beta)(a^9 + a beta) = a + a^11 beta.
- a + a^11 beta maps back to alpha^253 = alpha^-2.

The testbenches check every one of these intermediate values.

## Module hierarchy

```
rs_ev_alu                 top: opcode decode, adder, S1 mux, flag
├── gf_add #(8)           GF(2^8) adder (XOR)
└── gf256_muldiv          convert a, b; invert b; S0 mux; multiply; convert back
    ├── gf256_to_gf16 x2
    ├── gf16x2_inv        eq. for y0, y1 above
    │   ├── gf_add #(4) x2, gf16_mul x4, gf16_gamma_mul
    │   └── gf16_inv      (gf16_mul x5)
    ├── gf16x2_mul        (gf_add #(4) x4, gf16_mul x3, gf16_gamma_mul)
    └── gf16_to_gf256
gf_pkg                    types (gf256_t, gf16_t, gf16x2_t, alu_op_e), constants, gf16_mul_f
```

Each file in `rtl/` holds one module or package, with the same name as the
file.

## Using it in a decoder

The ALU does one operation per evaluation. A sequencer (microcode in the
original system) supplies the opcode and routes operands and results
through registers. None of that is part of this RTL. The RS(32,28) code
corrects up to t = 2 errors. For two errors at X1 and X2, the error values
take five operations:

    p   = X1 * S0        op 01
    num = S1 + p         op 10
    den = X1 + X2        op 1x
    E2  = num / den      op 00
    E1  = S0 + E2        op 10

A single error takes one: E = S1 / X1. `tb/tb_rs_error_values.sv` runs this
sequence on the ALU for 2500 random RS(32,28) error patterns.

## Where this RTL departs from the published design

- **One conversion for both operations.** The published block diagram draws
  the inverting circuit and the multiplier as GF(2^8) blocks, with the S0
  mux between them. The divider it describes converts into the subfield once,
  inverts and multiplies there, and converts back once. Here both operands
  are converted at the input, and the S0 mux sits in the subfield domain. One
  multiplier and one back-conversion then serve both multiply and divide.
  This takes two forward converters (one per operand), where the published
  gate count lists one.
- **`flag`.** The published top-level diagram has a `Flag` output but does
  not define it. Here it marks division by zero.
- **The XOR cell.** The published design picks a 4-transistor CMOS XOR cell
  for the adder. That is a library or layout choice. The RTL only writes
  `^`.
- **Insides of the GF(2^4) blocks.** The published design does not give the
  insides of the GF(2^4) multiplier, the gamma multiplier or the GF(2^4)
  inverter. Here they are the simplest correct circuits: a shift-and-add
  product, a constant product, and an exponentiation chain.
- **Gate count.** The published divider is quoted at 266 gates, against 935
  for a direct GF(2^8) divider. This RTL follows the same structure but has
  no gate-level netlist. Its size after synthesis depends on the tool and
  library, and has not been compared with those figures.
- **Not included.** The syndrome calculator, the error locator and the
  microcode controller. The ALU's ports stand in for them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference arithmetic in
`tb/gf_ref_pkg.sv` is written separately from the RTL: long division by the
field polynomials, inverses by search, and the composite product expanded
from its definition.

| testbench | what it checks |
|---|---|
| `tb_gf_add` | all 65536 pairs, 8- and 4-bit |
| `tb_gf16_mul` | all 256 pairs; gamma^i gamma^j = gamma^(i+j) |
| `tb_gf16_gamma_mul` | all 16 inputs |
| `tb_gf16_inv` | all 16 inputs |
| `tb_gf16x2_mul` | all 65536 pairs, worked example |
| `tb_gf16x2_inv` | all 256 inputs, bijectivity, worked example |
| `tb_gf256_to_gf16`, `tb_gf16_to_gf256` | bijection, maps 1 to 1, sums and products preserved for all pairs, worked example |
| `tb_gf256_muldiv` | all pairs, both modes |
| `tb_rs_ev_alu` | all 4 x 65536 opcode/operand cases, flag, worked example, every mechanism exercised |
| `tb_rs_error_values` | RS(32,28) error values for 2000 two-error and 500 one-error words |

Every testbench is exhaustive over its input space, except
`tb_rs_error_values`, which uses random error patterns. `tb_rs_ev_alu` runs
the top at its default (and only) size. Each testbench was also run
against a deliberately broken copy of its module, and each one failed as it
should.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_rs_ev_alu.sv --top-module tb_rs_ev_alu
./obj_dir/Vtb_rs_ev_alu
```

Swap in another `tb/tb_*.sv` to run that test. Each run takes well under a
second. Lint any module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/gf_pkg.sv rtl/<module>.sv`.
Verilator reports the package's unused constants as `UNUSEDPARAM`
warnings. These are expected.

## Changing it

- **Different field polynomial.** The conversion equations belong to the
  three polynomials above and cannot be reused with others. A new GF(2^8)
  polynomial needs new conversion matrices; the rest of the datapath stays.
  A new GF(2^4) polynomial or gamma means changing `GF16_RED` / `GAMMA` in
  `gf_pkg` and recomputing both matrices. Run `tb_gf256_to_gf16` and
  `tb_gf16_to_gf256` afterwards: they fail unless the matrices match the
  fields. The reference polynomials sit in the `ref_mul256` and `ref_mul16`
  functions of `tb/gf_ref_pkg.sv`.
- **Pipelining.** To pipeline the divider, the natural cut points are the
  output of the forward conversion and the output of `gf16x2_inv`.
- **Other widths.** The `M` parameter of `rs_ev_alu` documents the symbol
  width. Only 8 is supported, and elaboration stops with an error for any
  other value.
