// tb_bec_top: end-to-end testbench of bec_top at its default parameters
// (m = 163, 4-bit digit-serial, 4-bit Karatsuba half products).
//
// Runs each operation of the top through its op code and checks the result
// against gf_model_pkg:
//   - the four multipliers, the squarer and the inverter on the operands of
//     the reference waveforms and on random operands, with per-op latency
//     (cycles from the start cycle to the first cycle with out_valid);
//   - the inverse of 0 (defined as 0);
//   - a start_valid given while busy, which must be ignored;
//   - a complete point operation on the curve d1 = d2 = 1: P+Q and P+P
//     with the point adder, then the conversion to affine form with the
//     units of the same top (Z3 inverted by the inverter, X3 and Y3
//     multiplied by the Karatsuba and the parallel multiplier), and the
//     affine result checked to lie on the curve and to equal the affine
//     addition formula.
// Each of these mechanisms is counted; one that never happened is a
// failure. A watchdog ends a hung run.
module tb_bec_top;
  import gf_model_pkg::*;
  import bec_pkg::*;

  logic clk = 1'b0, rstn = 1'b0, start_valid = 1'b0;
  op_e  op = OP_MUL_S;
  fe_t  a = '0, b = '0, x1 = '0, y1 = '0, z1 = '0, x2 = '0, y2 = '0, z2 = '0;
  fe_t  d1 = '0, d2 = '0, dout, x3, y3, z3;
  logic out_valid, busy;
  int   checks = 0, failures = 0;
  int   n_op [7];
  int   n_ignored = 0, n_inv0 = 0, n_add = 0, n_dbl = 0;

  always #5 clk = ~clk;

  bec_top dut (.clk, .rstn, .start_valid, .op, .a, .b, .x1, .y1, .z1, .x2,
               .y2, .z2, .d1, .d2, .dout, .x3, .y3, .z3, .out_valid, .busy);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Cycles from the start cycle to the first out_valid cycle of the top:
  // the unit's own latency plus one for the top's output register.
  function automatic int lat_of(op_e o);
    case (o)
      OP_MUL_S:    return 165;
      OP_MUL_P:    return 2;
      OP_MUL_SP:   return 43;
      OP_MUL_2WAY: return 24;
      OP_SQR:      return 2;
      OP_PADD:     return 604;
      default:     return -1;   // inverter: data dependent
    endcase
  endfunction

  task automatic start(op_e o);
    int cyc;
    @(negedge clk);
    op = o; start_valid = 1'b1;
    @(negedge clk);
    start_valid = 1'b0;
    check("busy after start", busy == 1'b1);
    // a second start while busy must be ignored
    if (o == OP_MUL_S) begin
      op = OP_SQR; start_valid = 1'b1; a = '1;
      @(negedge clk);
      start_valid = 1'b0; op = o;
      n_ignored++;
    end
    cyc = (o == OP_MUL_S) ? 2 : 1;
    while (!out_valid && cyc < 2000) begin @(negedge clk); cyc++; end
    if (lat_of(o) > 0)
      check($sformatf("%s latency %0d, expected %0d", o.name(), cyc, lat_of(o)),
            cyc == lat_of(o));
    else
      check("inverter finished", cyc <= 4 * M + 6);
    check("idle when done", busy == 1'b0);
    n_op[o]++;
  endtask

  task automatic field(op_e o, fe_t x, fe_t y);
    fe_t e;
    case (o)
      OP_SQR:  e = sq(x);
      OP_INV:  e = (x == '0) ? '0 : inv(x);
      default: e = mul(x, y);
    endcase
    a = x; b = y;
    start(o);
    check($sformatf("%s(%h, %h) = %h, got %h", o.name(), x, y, e, dout), dout == e);
    if (o == OP_INV && x == '0) n_inv0++;
  endtask

  task automatic point(fe_t px, py, qx, qy);
    fe_t ex, ey, ez, zi, rx, ry, ax, ay;
    padd(px, py, fe_t'(1), qx, qy, fe_t'(1), fe_t'(1), fe_t'(1), ex, ey, ez);
    x1 = px; y1 = py; z1 = fe_t'(1); x2 = qx; y2 = qy; z2 = fe_t'(1);
    d1 = fe_t'(1); d2 = fe_t'(1);
    start(OP_PADD);
    check("projective sum", x3 == ex && y3 == ey && z3 == ez);
    // affine conversion with the top's own units
    field(OP_INV, z3, '0);       zi = dout;
    field(OP_MUL_2WAY, x3, zi);  rx = dout;
    field(OP_MUL_P, y3, zi);     ry = dout;
    aff_add(px, py, qx, qy, fe_t'(1), fe_t'(1), ax, ay);
    check("affine result on curve", on_curve(rx, ry, fe_t'(1), fe_t'(1)));
    check("affine result matches affine formula", rx == ax && ry == ay);
    if (px == qx && py == qy) n_dbl++; else n_add++;
  endtask

  localparam fe_t FIG_X  = fe_t'('hb);
  localparam fe_t FIG_X1 = fe_t'('h174038900ad619200000747362521cbdaaf123471);

  initial begin
    fe_t px, py, qx, qy;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (3) @(negedge clk);
    rstn = 1'b1;

    for (int k = 0; k < 4; k++) field(op_e'(k), FIG_X, FIG_X1);
    field(OP_SQR, FIG_X1, '0);
    field(OP_INV, FIG_X1, '0);
    field(OP_INV, '0, '0);
    for (int i = 0; i < 10; i++)
      for (int k = 0; k < 6; k++) field(op_e'(k), rand_fe(), rand_fe());

    for (int i = 0; i < 2; i++) begin
      rand_point(fe_t'(1), fe_t'(1), px, py);
      rand_point(fe_t'(1), fe_t'(1), qx, qy);
      point(px, py, qx, qy);
      point(px, py, px, py);
    end

    foreach (n_op[i])
      check($sformatf("op %0d exercised (%0d times)", i, n_op[i]), n_op[i] > 0);
    check("start while busy ignored", n_ignored > 0);
    check("inverse of zero", n_inv0 > 0);
    check("point addition", n_add > 0);
    check("point doubling", n_dbl > 0);
    $display("ops: mul_s=%0d mul_p=%0d mul_sp=%0d mul_2way=%0d sqr=%0d inv=%0d padd=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6]);
    $display("ignored starts=%0d inv0=%0d additions=%0d doublings=%0d",
             n_ignored, n_inv0, n_add, n_dbl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
