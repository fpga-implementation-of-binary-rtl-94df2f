// bec_top: GF(2^163) arithmetic units and binary Edwards point adder.
//
// Holds one of each unit: the four multipliers (bit-serial multi_s, fully
// parallel multi_p, 4-bit digit-serial multi_sp, 2-way Karatsuba
// multi_2way), the squarer, the extended-Euclidean inverter and the
// projective point adder (which has its own Karatsuba multiplier and
// squarer inside). The multipliers trade area against cycles: 163, 1, 41
// and 22 cycles per product.
//
// Interface: start_valid with an op code (bec_pkg::op_e) starts the chosen
// unit; field units read a (and b), the point adder reads x1..z2, d1, d2.
// While an operation runs, busy is high and further start_valid pulses are
// ignored. When the unit finishes, dout receives its field result (field
// ops) and out_valid goes high and stays high until the next accepted
// start; the point sum is on x3, y3, z3. Synchronous active-low reset.
// This op-select wrapper is this implementation's own way of making every
// unit reachable from one set of pins; the units themselves follow the
// design.
module bec_top #(
  parameter int unsigned M        = bec_pkg::GF_M,
  parameter int unsigned SP_DIGIT = 4,
  parameter int unsigned KA_DIGIT = 4
) (
  input  logic          clk,
  input  logic          rstn,
  input  logic          start_valid,
  input  bec_pkg::op_e  op,
  input  logic [M-1:0]  a, b,
  input  logic [M-1:0]  x1, y1, z1,
  input  logic [M-1:0]  x2, y2, z2,
  input  logic [M-1:0]  d1, d2,
  output logic [M-1:0]  dout,
  output logic [M-1:0]  x3, y3, z3,
  output logic          out_valid,
  output logic          busy
);
  import bec_pkg::*;

  localparam logic [M-1:0] POLY = M'(GF_POLY);

  op_e          op_q;
  logic         go;
  logic [6:0]   st, vld;
  logic [M-1:0] d_s, d_p, d_sp, d_ka, d_sq, d_inv;
  logic [M-1:0] sel_dout;
  logic         sel_valid;

  assign go = start_valid && !busy;
  for (genvar k = 0; k < 7; k++) begin : g_start
    assign st[k] = go && (op == op_e'(k));
  end

  multi_s    #(.M(M), .POLY(POLY)) u_multi_s (
    .clk, .rstn, .start_valid(st[OP_MUL_S]), .a, .b, .dout(d_s), .out_valid(vld[OP_MUL_S]));
  multi_p    #(.M(M), .POLY(POLY)) u_multi_p (
    .clk, .rstn, .start_valid(st[OP_MUL_P]), .a, .b, .dout(d_p), .out_valid(vld[OP_MUL_P]));
  multi_sp   #(.M(M), .POLY(POLY), .DIGIT(SP_DIGIT)) u_multi_sp (
    .clk, .rstn, .start_valid(st[OP_MUL_SP]), .a, .b, .dout(d_sp), .out_valid(vld[OP_MUL_SP]));
  multi_2way #(.M(M), .POLY(POLY), .DIGIT(KA_DIGIT)) u_multi_2way (
    .clk, .rstn, .start_valid(st[OP_MUL_2WAY]), .a, .b, .dout(d_ka), .out_valid(vld[OP_MUL_2WAY]));
  sqr        #(.M(M), .POLY(POLY)) u_sqr (
    .clk, .rstn, .start_valid(st[OP_SQR]), .a, .dout(d_sq), .out_valid(vld[OP_SQR]));
  inverse    #(.M(M), .POLY(POLY)) u_inverse (
    .clk, .rstn, .start_valid(st[OP_INV]), .a, .dout(d_inv), .out_valid(vld[OP_INV]));
  point_add  #(.M(M), .POLY(POLY), .KA_DIGIT(KA_DIGIT)) u_point_add (
    .clk, .rstn, .start_valid(st[OP_PADD]), .x1, .y1, .z1, .x2, .y2, .z2, .d1, .d2,
    .x3, .y3, .z3, .out_valid(vld[OP_PADD]));

  always_comb begin
    case (op_q)
      OP_MUL_S:    sel_dout = d_s;
      OP_MUL_P:    sel_dout = d_p;
      OP_MUL_SP:   sel_dout = d_sp;
      OP_MUL_2WAY: sel_dout = d_ka;
      OP_SQR:      sel_dout = d_sq;
      OP_INV:      sel_dout = d_inv;
      default:     sel_dout = '0;
    endcase
    sel_valid = vld[op_q];
  end

  // Every unit drops (level units) or has not yet raised (one-cycle units)
  // its out_valid in the cycle after its start, so the first cycle of busy
  // never sees a stale result.
  always_ff @(posedge clk) begin
    if (!rstn) begin
      busy <= 1'b0; out_valid <= 1'b0; op_q <= OP_MUL_S; dout <= '0;
    end else if (go) begin
      busy <= 1'b1; out_valid <= 1'b0; op_q <= op;
    end else if (busy && sel_valid) begin
      busy <= 1'b0; out_valid <= 1'b1; dout <= sel_dout;
    end
  end

  property p_valid_idle;
    @(posedge clk) disable iff (!rstn) out_valid |-> !busy;
  endproperty
  a_valid_idle: assert property (p_valid_idle);

endmodule
