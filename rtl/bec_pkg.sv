// bec_pkg: constants and types shared by the GF(2^163) field units and the
// binary Edwards curve point adder.
//
// The field is GF(2^m) in polynomial basis with m = 163 and the NIST
// reduction polynomial f(z) = z^163 + z^7 + z^6 + z^3 + 1. GF_POLY holds the
// part of f(z) below z^m; the z^m term is implicit everywhere.
//
// The point adder runs a short microprogram (ucode) over a small register
// file. Each step computes
//     R[dst] = (R[ra] ^ R[rb]) * (R[rc] ^ R[rd]) ^ R[re]
// or, for a squaring step, R[dst] = (R[ra] ^ R[rb])^2 ^ R[re]. Field addition
// is XOR, so the two operand XORs and the final XOR absorb every addition of
// the projective addition formula. The step order is this design's own; the
// formula itself is the standard unified binary Edwards addition
// (W1, W2, A, B, C, D, E, H, I, U, V, S, then X3, Y3, Z3).
package bec_pkg;

  localparam int unsigned GF_M = 163;
  localparam logic [GF_M-1:0] GF_POLY = GF_M'('hC9); // z^7 + z^6 + z^3 + 1

  // Operation select of the top level.
  typedef enum logic [2:0] {
    OP_MUL_S    = 3'd0,  // bit-serial multiplier
    OP_MUL_P    = 3'd1,  // fully parallel multiplier
    OP_MUL_SP   = 3'd2,  // digit-serial (serial-parallel) multiplier
    OP_MUL_2WAY = 3'd3,  // 2-way Karatsuba-Ofman multiplier
    OP_SQR      = 3'd4,  // squarer
    OP_INV      = 3'd5,  // inverter
    OP_PADD     = 3'd6   // point addition
  } op_e;

  // Register file of the point adder.
  typedef enum logic [4:0] {
    R_ZERO, R_X1, R_Y1, R_Z1, R_X2, R_Y2, R_Z2, R_D1, R_D2,
    R_A, R_B, R_C, R_D, R_E, R_H, R_I, R_U, R_V, R_S,
    R_T1, R_T2, R_C2, R_X3, R_Y3, R_Z3
  } reg_e;
  localparam int unsigned NUM_REGS = 25;

  typedef struct packed {
    logic sq;               // 1: squaring step, operand (ra^rb) only
    reg_e ra, rb, rc, rd;   // operand sources
    reg_e re;               // added to the product
    reg_e dst;              // destination
  } uop_t;

  localparam int unsigned UCODE_LEN = 26;

  function automatic uop_t mk(logic sq, reg_e ra, reg_e rb, reg_e rc, reg_e rd,
                              reg_e re, reg_e dst);
    uop_t u;
    u.sq = sq; u.ra = ra; u.rb = rb; u.rc = rc; u.rd = rd; u.re = re; u.dst = dst;
    return u;
  endfunction

  // Projective unified addition, one product per step.
  function automatic uop_t ucode(int unsigned pc);
    case (pc)
      0:  return mk(1'b0, R_X1, R_ZERO, R_X1, R_Z1,   R_ZERO, R_A);  // A  = X1(X1+Z1)
      1:  return mk(1'b0, R_Y1, R_ZERO, R_Y1, R_Z1,   R_ZERO, R_B);  // B  = Y1(Y1+Z1)
      2:  return mk(1'b0, R_Z1, R_ZERO, R_Z2, R_ZERO, R_ZERO, R_C);  // C  = Z1 Z2
      3:  return mk(1'b0, R_X2, R_Y2,   R_Z2, R_ZERO, R_ZERO, R_D);  // D  = W2 Z2
      4:  return mk(1'b1, R_C,  R_ZERO, R_ZERO, R_ZERO, R_ZERO, R_C2); // C^2
      5:  return mk(1'b0, R_D1, R_ZERO, R_C2, R_ZERO, R_ZERO, R_E);  // E  = d1 C^2
      6:  return mk(1'b0, R_D1, R_ZERO, R_Z2, R_ZERO, R_ZERO, R_T1); // d1 Z2
      7:  return mk(1'b0, R_D2, R_ZERO, R_X2, R_Y2,   R_ZERO, R_T2); // d2 W2
      8:  return mk(1'b0, R_T1, R_T2,   R_X1, R_Y1,   R_ZERO, R_T1); // (d1 Z2 + d2 W2) W1
      9:  return mk(1'b0, R_T1, R_ZERO, R_C,  R_ZERO, R_ZERO, R_H);  // H
      10: return mk(1'b0, R_D1, R_ZERO, R_C,  R_ZERO, R_ZERO, R_T1); // d1 C
      11: return mk(1'b0, R_T1, R_ZERO, R_Z1, R_ZERO, R_ZERO, R_I);  // I  = d1 C Z1
      12: return mk(1'b0, R_A,  R_ZERO, R_D,  R_ZERO, R_E,    R_U);  // U  = E + A D
      13: return mk(1'b0, R_B,  R_ZERO, R_D,  R_ZERO, R_E,    R_V);  // V  = E + B D
      14: return mk(1'b0, R_U,  R_ZERO, R_V,  R_ZERO, R_ZERO, R_S);  // S  = U V
      15: return mk(1'b0, R_A,  R_ZERO, R_Y2, R_Z2,   R_ZERO, R_T1); // A(Y2+Z2)
      16: return mk(1'b0, R_X2, R_ZERO, R_I,  R_T1,   R_ZERO, R_T1); // X2(I + ..)
      17: return mk(1'b0, R_H,  R_T1,   R_V,  R_ZERO, R_ZERO, R_T1); // (H + ..) V
      18: return mk(1'b0, R_T1, R_ZERO, R_Z1, R_ZERO, R_ZERO, R_T1); // .. Z1
      19: return mk(1'b0, R_S,  R_ZERO, R_Y1, R_ZERO, R_T1,   R_X3); // X3 = S Y1 + ..
      20: return mk(1'b0, R_B,  R_ZERO, R_X2, R_Z2,   R_ZERO, R_T1); // B(X2+Z2)
      21: return mk(1'b0, R_Y2, R_ZERO, R_I,  R_T1,   R_ZERO, R_T1); // Y2(I + ..)
      22: return mk(1'b0, R_H,  R_T1,   R_U,  R_ZERO, R_ZERO, R_T1); // (H + ..) U
      23: return mk(1'b0, R_T1, R_ZERO, R_Z1, R_ZERO, R_ZERO, R_T1); // .. Z1
      24: return mk(1'b0, R_S,  R_ZERO, R_X1, R_ZERO, R_T1,   R_Y3); // Y3 = S X1 + ..
      default: return mk(1'b0, R_S, R_ZERO, R_Z1, R_ZERO, R_ZERO, R_Z3); // Z3 = S Z1
    endcase
  endfunction

endpackage
