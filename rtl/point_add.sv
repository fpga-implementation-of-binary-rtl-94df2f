// point_add: unified point addition on a binary Edwards curve
//     d1(x+y) + d2(x^2+y^2) = xy + xy(x+y) + x^2 y^2   over GF(2^M),
// in projective coordinates (X:Y:Z), so no inversion is needed:
//   W1 = X1+Y1, W2 = X2+Y2, A = X1(X1+Z1), B = Y1(Y1+Z1), C = Z1 Z2,
//   D = W2 Z2, E = d1 C^2, H = (d1 Z2 + d2 W2) W1 C, I = d1 C Z1,
//   U = E + A D, V = E + B D, S = U V,
//   X3 = S Y1 + (H + X2 (I + A (Y2+Z2))) V Z1
//   Y3 = S X1 + (H + Y2 (I + B (X2+Z2))) U Z1
//   Z3 = S Z1
// The formula is unified: the same unit doubles a point when P = Q.
//
// Datapath: one 2-way Karatsuba multiplier (multi_2way) and one squarer
// (sqr) shared over a 25-entry register file. A 26-step microprogram
// (bec_pkg::ucode) issues one product per step, each of the form
//   R[dst] = (R[ra]^R[rb]) * (R[rc]^R[rd]) ^ R[re]
// so every field addition of the formula rides along with a product.
// Step 4 (C^2) uses the squarer, the other 25 the multiplier.
//
// Interface: a one-cycle start_valid copies x1..z2, d1 and d2 into the
// register file. out_valid rises when Z3 is written (about 25*(KA latency+1)
// + 3 cycles, 579 with the defaults) and stays high, with x3, y3, z3 held,
// until the next start_valid. Synchronous active-low reset. The formula is
// the design's; the choice of multiplier, the register file and the step
// order are this implementation's.
module point_add #(
  parameter int unsigned  M        = bec_pkg::GF_M,
  parameter logic [M-1:0] POLY     = bec_pkg::GF_POLY,
  parameter int unsigned  KA_DIGIT = 4
) (
  input  logic         clk,
  input  logic         rstn,
  input  logic         start_valid,
  input  logic [M-1:0] x1, y1, z1,
  input  logic [M-1:0] x2, y2, z2,
  input  logic [M-1:0] d1, d2,
  output logic [M-1:0] x3, y3, z3,
  output logic         out_valid
);
  import bec_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  state_e       state;
  logic [4:0]   pc;
  uop_t         uop;
  logic [M-1:0] rf [NUM_REGS];
  logic [M-1:0] op_a, op_b;
  logic         mul_start, sqr_start, mul_valid, sqr_valid;
  logic [M-1:0] mul_dout, sqr_dout, res;

  assign uop  = ucode(32'(pc));
  assign op_a = rf[uop.ra] ^ rf[uop.rb];
  assign op_b = rf[uop.rc] ^ rf[uop.rd];

  assign mul_start = (state == S_ISSUE) && !uop.sq;
  assign sqr_start = (state == S_ISSUE) &&  uop.sq;

  multi_2way #(.M(M), .POLY(POLY), .DIGIT(KA_DIGIT)) u_mul (
    .clk, .rstn, .start_valid(mul_start), .a(op_a), .b(op_b),
    .dout(mul_dout), .out_valid(mul_valid));

  sqr #(.M(M), .POLY(POLY)) u_sqr (
    .clk, .rstn, .start_valid(sqr_start), .a(op_a),
    .dout(sqr_dout), .out_valid(sqr_valid));

  assign res = (uop.sq ? sqr_dout : mul_dout) ^ rf[uop.re];

  always_ff @(posedge clk) begin
    if (!rstn) begin
      state <= S_IDLE; pc <= '0; out_valid <= 1'b0;
      for (int i = 0; i < int'(NUM_REGS); i++) rf[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (start_valid) begin
          rf[R_X1] <= x1; rf[R_Y1] <= y1; rf[R_Z1] <= z1;
          rf[R_X2] <= x2; rf[R_Y2] <= y2; rf[R_Z2] <= z2;
          rf[R_D1] <= d1; rf[R_D2] <= d2;
          pc <= '0; out_valid <= 1'b0; state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (uop.sq ? sqr_valid : mul_valid) begin
          rf[uop.dst] <= res;
          if (32'(pc) == UCODE_LEN - 1) begin
            state <= S_IDLE; out_valid <= 1'b1;
          end else begin
            pc <= pc + 1'b1; state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign x3 = rf[R_X3];
  assign y3 = rf[R_Y3];
  assign z3 = rf[R_Z3];

  // R_ZERO is never a destination, so it stays 0 after reset.
  property p_zero_kept;
    @(posedge clk) disable iff (!rstn) rf[R_ZERO] == '0;
  endproperty
  a_zero_kept: assert property (p_zero_kept);

  property p_no_restart;
    @(posedge clk) disable iff (!rstn) start_valid |-> state == S_IDLE;
  endproperty
  a_no_restart: assert property (p_no_restart);

endmodule
