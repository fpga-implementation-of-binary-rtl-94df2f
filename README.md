# Binary Edwards curve point addition over GF(2^163)

This RTL adds two points on a binary Edwards curve

    d1(x + y) + d2(x^2 + y^2) = xy + xy(x + y) + x^2 y^2      over GF(2^163)

The addition law of this curve family is *unified*: one formula covers both
P + Q and P + P. A single unit therefore both adds and doubles points, with
no special cases. The adder works in projective coordinates (X : Y : Z), so it
never inverts a field element. Each addition is a fixed sequence of 25
multiplications and one squaring.

The design is built bottom-up from a small library of GF(2^163) units. There
are four multipliers that trade area against speed, a squarer and an
inverter. The point adder uses one of the multipliers (the Karatsuba one)
and the squarer. The top level, `bec_top`, holds one of each unit and the
point adder. An op code selects which one runs.

## The field

Elements are 163-bit vectors in polynomial basis. Bit i is the coefficient
of z^i. Addition is XOR. Multiplication is carry-less multiplication
followed by reduction modulo the NIST pentanomial

    f(z) = z^163 + z^7 + z^6 + z^3 + 1

`bec_pkg::GF_POLY` holds the low part of f (0xC9). The z^163 term is implicit.
Every unit takes `M` and `POLY` as parameters, so another field can be
built. Nothing other than m = 163 has been simulated.

`gf_reduce` is the shared reduction network. It cancels each coefficient at
or above z^M, working down from the top, by adding a shifted copy of f. With
a constant `POLY`, this collapses into a fixed XOR tree with no clock.
`gf_reduce` is used by every unit except the bit-serial multiplier and the
inverter.

## Four multipliers

All four compute `dout = a * b mod f`. They differ in how much of the
product they form per clock:

| module       | method                                                     | latency (cycles) |
|--------------|------------------------------------------------------------|------------------|
| `multi_s`    | bit-serial, Horner, MSB first: c = c*z + a_i*b             | 164              |
| `multi_p`    | fully parallel AND/XOR array plus reduction                | 1                |
| `multi_sp`   | digit-serial, 4 bits of a per clock: c = c*z^4 + A_k*b     | 42               |
| `multi_2way` | one level of 2-way Karatsuba-Ofman, three half products    | 23               |

Latency here means cycles from the cycle that holds `start_valid` to the
first cycle that shows `out_valid`.

`multi_2way` is the most involved. It works as follows:

- Operands are zero-extended to 164 bits, an even width, and split into
  82-bit halves: a = A0 + z^82 A1, and likewise for b.
- Three carry-less products run in parallel, each in a `clmul_ds`:
  P0 = A0 B0, P1 = (A0+A1)(B0+B1) and P2 = A1 B1. Each takes 4 bits per
  clock, so it needs 21 steps.
- The full product is P0 + (P0+P1+P2) z^82 + P2 z^164. It is reduced in one
  further cycle.

Three half-size products replace the four of a plain split. The unit also
finishes well ahead of the 4-bit digit-serial multiplier. Its digit width
`DIGIT` (default 4) is this implementation's choice.

## Squarer and inverter

`sqr` relies on the fact that squaring over GF(2) only spreads the bits:
a_i moves to position 2i. The spreading is plain wiring. It is followed by
`gf_reduce` and one output register, so the latency is 1 cycle.

`inverse` implements the binary extended Euclidean algorithm:

- State: u = a, v = f, g1 = 1, g2 = 0. The invariants are g1*a = u and
  g2*a = v.
- Each clock does one of three things:
  - halves whichever of u and v is divisible by z, and divides its g by z
    modulo f;
  - otherwise, adds the smaller of u and v into the larger, and does the
    same to the g values.
- It stops when u or v equals 1. The matching g is the inverse.

u and v are compared as integers rather than by degree. This picks the same
branch whenever the degrees differ. When they are equal, either branch still
lowers a degree.

The run time depends on the data. It is bounded by about 4*163 steps. Over
66 random and corner operands, the longest run was 434 cycles. The inverse
of 0 does not exist; this unit returns 0 for it.

## The point adder

`point_add` evaluates, with W1 = X1+Y1 and W2 = X2+Y2:

    A = X1(X1+Z1)   B = Y1(Y1+Z1)   C = Z1 Z2   D = W2 Z2   E = d1 C^2
    H = (d1 Z2 + d2 W2) W1 C        I = d1 C Z1
    U = E + A D     V = E + B D     S = U V
    X3 = S Y1 + (H + X2 (I + A (Y2+Z2))) V Z1
    Y3 = S X1 + (H + Y2 (I + B (X2+Z2))) U Z1
    Z3 = S Z1

This formula was checked against the affine addition law:

    x3 = [d1(x1+x2) + d2(x1+y1)(x2+y2) + (x1+x1^2)(x2(y1+y2+1) + y1 y2)]
         / [d1 + (x1+x1^2)(x2+y2)]

y3 is the same expression with x and y exchanged. The check used random
points of the curve with d1 = d2 = 1, for both addition and doubling.

**Datapath.** The adder has one `multi_2way`, one `sqr`, and a register
file of 25 entries × 163 bits:

- the inputs X1..Z2, d1 and d2;
- a constant zero;
- 13 temporaries;
- X3, Y3 and Z3.

**Microprogram.** A 26-step microprogram, `bec_pkg::ucode`, drives the
datapath. Every step has the form

    R[dst] = (R[ra] ^ R[rb]) * (R[rc] ^ R[rd]) ^ R[re]

so each field addition in the formula is folded into a multiplication step.
Step 4 (C^2) uses the squarer. The other 25 steps use the multiplier.

**State machine.** There are three states:

- IDLE loads the inputs on `start_valid`.
- ISSUE pulses the unit's start.
- WAIT writes the result back when the unit raises `out_valid`, and then
  advances the step counter.

One multiplication step takes 24 cycles and the squaring step takes 2, so a
point addition takes 603 cycles from start to `out_valid`. To change the
schedule, edit `ucode` and `UCODE_LEN` in `bec_pkg`. The register names are
the enum `reg_e`.

The curve parameters d1 and d2 are inputs, so any curve of the family can be
used. Z1 and Z2 may be any non-zero value. To map the result back to affine
form, divide X3 and Y3 by Z3. On `bec_top` this takes one `OP_INV` and two
multiplications; the end-to-end testbench does exactly that.

## Top level and handshake

Every unit has the same interface:

- `clk` and an active-low synchronous reset `rstn`;
- a one-cycle `start_valid` that samples the operands;
- the result on `dout`;
- an `out_valid` flag.

The sequential units (`multi_s`, `multi_sp`, `multi_2way`, `inverse` and
`point_add`) raise `out_valid` when they finish. It stays high, with the
result held, until the next start. The one-cycle units (`multi_p` and `sqr`)
pulse `out_valid` for one cycle, and their `dout` holds until the next start.
Starting a sequential unit while it is busy breaks the protocol. An
assertion in each unit flags it.

`bec_top` adds an op code (`bec_pkg::op_e`): `OP_MUL_S`, `OP_MUL_P`,
`OP_MUL_SP`, `OP_MUL_2WAY`, `OP_SQR`, `OP_INV` or `OP_PADD`. It works as
follows:

- `start_valid` while idle starts the selected unit and raises `busy`.
- Starts while busy are ignored.
- When the unit finishes, the top registers its field result on `dout` and
  raises `out_valid` until the next accepted start. Each latency above
  therefore grows by one cycle at the top.
- The point sum is on `x3`, `y3` and `z3`.

Field units read `a` and `b`. The point adder reads `x1`..`z2`, `d1` and
`d2`.

## Simulating

The testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=F`. They take their expected values from
`tb/gf_model_pkg.sv`, a plain reference model. It contains:

- a schoolbook multiply with long division;
- a Fermat inverse, a^(2^163-2);
- the projective and affine addition formulas;
- the curve equation;
- a generator of random curve points, which solves the quadratic in y with
  the half-trace.

To build and run one testbench, for example the end-to-end test of the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bec_pkg.sv tb/gf_model_pkg.sv tb/tb_bec_top.sv --top-module tb_bec_top
    ./obj_dir/Vtb_bec_top

| testbench       | what it covers                                                        |
|-----------------|-----------------------------------------------------------------------|
| `tb_multi_s`, `tb_multi_p`, `tb_multi_sp`, `tb_multi_2way` | a known vector, corner operands, 200 random products, exact latency, result hold |
| `tb_sqr`        | known vector, corners, 300 random squares, one-cycle pulse            |
| `tb_inverse`    | known vector, 1, z, z^162, all ones, 0, 60 random; a*a^-1 = 1; bounded run time |
| `tb_point_add`  | fixed inputs with d1 = d2 = 1 and Z = 1 (including the intermediate values A, C, D, H); curve points, both added and doubled, checked in affine form on the curve; random d1, d2 and inputs; exact latency |
| `tb_bec_top`    | every op code at default parameters, the inverse of 0, an ignored start while busy, and full point additions and doublings converted to affine form by the top's own inverter and multipliers; each of these events is counted and must occur |

The known vector is a = 0xb times b = 0x174038900ad619200000747362521cbdaaf123471. Its expected results are:

- product: 0x3c18d3049cae26000033f0eb466c02ba89a7ffd2
- b^2: 0x5de27056fea4024077b0787db35118104051015c8
- b^-1: 0x483804df0018a66c3d0c3225d8d1abb598eba4cdc

Every testbench runs in a few seconds at the full 163-bit size.

## What this design chooses, and what it leaves out

The following come from the underlying design: the field and its
polynomial, the four multiplier types, the 4-bit digit of `multi_sp`, the
one-level Karatsuba split, the one-cycle squarer, the extended Euclidean
inverter and the projective addition formula.

The following are this implementation's own choices:

- the handshake, the reset and the output registers;
- padding to 164 bits for the Karatsuba split;
- the sequential 4-bit half products in `multi_2way`;
- the integer comparison in the inverter, and its result for 0;
- using `multi_2way` in the point adder;
- the microprogram and the register file;
- the op-select wrapper of `bec_top`.

A published waveform of the original point adder shows outputs that do not
follow from the projective formula for the inputs it shows, although the
intermediate values it shows (A, C, D, H) do. This RTL follows the formula.
The formula was cross-checked against the affine addition law on points of
the curve.

Not included: scalar (point) multiplication and a dedicated doubling unit.
The underlying design leaves both for later. There is also no check that
input points lie on the curve. Area and timing figures have not been
measured on an FPGA.
