// tb_point_add: self-checking testbench of point_add, the projective
// binary Edwards point adder.
//
// Three groups of operations:
//  1. The inputs of the reference waveform of the point adder: d1 = d2 = 1,
//     X1 = Y1 = 0x174038900ad619200000747362521cbdaaf123471,
//     X2 = Y2 = 0x2740389eead619200000747362521cbdaaf123471, Z1 = Z2 = 1.
//     The outputs are compared with the projective formula of
//     gf_model_pkg, and the intermediate A = X1(X1+Z1) with its printed
//     leading digits 4aa248c6 and C = 1, D = 0, H = 0 inside the unit.
//  2. Random points of the curve with d1 = d2 = 1, added to other points
//     (addition) and to themselves (doubling). The result is compared with
//     the model, and after division by Z3 it must lie on the curve and equal
//     the affine addition formula.
//  3. Random d1, d2 and random projective inputs (not on any curve):
//     checks the formula bit for bit.
// Every operation must take exactly LAT cycles from the cycle holding
// start_valid to the first cycle showing out_valid. A watchdog ends a hung
// run.
module tb_point_add;
  import gf_model_pkg::*;

  localparam int LAT   = 25 * 24 + 2 + 1;   // 25 products, 1 square, load
  localparam int NPT   = 4;
  localparam int NRAND = 4;

  logic clk = 1'b0, rstn = 1'b0, start_valid = 1'b0;
  fe_t  x1, y1, z1, x2, y2, z2, d1, d2, x3, y3, z3;
  logic out_valid;
  int   checks = 0, failures = 0;
  int   n_add = 0, n_dbl = 0;

  always #5 clk = ~clk;

  point_add dut (.clk, .rstn, .start_valid, .x1, .y1, .z1, .x2, .y2, .z2,
                 .d1, .d2, .x3, .y3, .z3, .out_valid);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(fe_t px, py, pz, qx, qy, qz, c1, c2);
    int cyc;
    fe_t ex, ey, ez;
    padd(px, py, pz, qx, qy, qz, c1, c2, ex, ey, ez);
    @(negedge clk);
    x1 = px; y1 = py; z1 = pz; x2 = qx; y2 = qy; z2 = qz; d1 = c1; d2 = c2;
    start_valid = 1'b1;
    @(negedge clk);
    start_valid = 1'b0;
    x1 = rand_fe(); y1 = rand_fe(); x2 = rand_fe(); y2 = rand_fe();
    cyc = 1;
    while (!out_valid && cyc < 2 * LAT) begin @(negedge clk); cyc++; end
    check($sformatf("latency %0d, expected %0d", cyc, LAT), cyc == LAT);
    check($sformatf("X3 %h, expected %h", x3, ex), x3 == ex);
    check($sformatf("Y3 %h, expected %h", y3, ey), y3 == ey);
    check($sformatf("Z3 %h, expected %h", z3, ez), z3 == ez);
  endtask

  initial begin
    fe_t px, py, qx, qy, ax, ay, rx, ry, zi;
    repeat (3) @(negedge clk);
    rstn = 1'b1;

    // 1. reference waveform inputs
    run(fe_t'('h174038900ad619200000747362521cbdaaf123471),
        fe_t'('h174038900ad619200000747362521cbdaaf123471), fe_t'(1),
        fe_t'('h2740389eead619200000747362521cbdaaf123471),
        fe_t'('h2740389eead619200000747362521cbdaaf123471), fe_t'(1),
        fe_t'(1), fe_t'(1));
    check("intermediate A starts with 4aa248c6",
          dut.rf[bec_pkg::R_A][M-1 -: 31] == 31'h4aa248c6);
    check("intermediate C = 1, D = 0, H = 0",
          dut.rf[bec_pkg::R_C] == fe_t'(1) && dut.rf[bec_pkg::R_D] == '0 &&
          dut.rf[bec_pkg::R_H] == '0);

    // 2. points of the curve d1 = d2 = 1
    for (int i = 0; i < NPT; i++) begin
      rand_point(fe_t'(1), fe_t'(1), px, py);
      rand_point(fe_t'(1), fe_t'(1), qx, qy);
      check("generated P on curve", on_curve(px, py, fe_t'(1), fe_t'(1)));
      check("generated Q on curve", on_curve(qx, qy, fe_t'(1), fe_t'(1)));
      for (int dbl = 0; dbl < 2; dbl++) begin
        if (dbl == 1) begin qx = px; qy = py; end
        // give P a random Z to exercise the projective form
        zi = rand_fe();
        run(mul(px, zi), mul(py, zi), zi, qx, qy, fe_t'(1), fe_t'(1), fe_t'(1));
        zi = inv(z3);
        rx = mul(x3, zi); ry = mul(y3, zi);
        aff_add(px, py, qx, qy, fe_t'(1), fe_t'(1), ax, ay);
        check("sum on curve", on_curve(rx, ry, fe_t'(1), fe_t'(1)));
        check("projective sum equals affine sum", rx == ax && ry == ay);
        if (dbl == 1) n_dbl++; else n_add++;
      end
    end

    // 3. random curve parameters and inputs
    for (int i = 0; i < NRAND; i++)
      run(rand_fe(), rand_fe(), rand_fe(), rand_fe(), rand_fe(), rand_fe(),
          rand_fe(), rand_fe());

    check("additions and doublings both exercised", n_add > 0 && n_dbl > 0);
    $display("additions=%0d doublings=%0d", n_add, n_dbl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((1 + 2 * NPT + NRAND + 4) * (LAT + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
