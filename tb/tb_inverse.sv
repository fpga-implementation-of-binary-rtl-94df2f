// tb_inverse: self-checking testbench of inverse, the extended Euclidean
// inverter.
//
// Drives the operand printed in the reference waveform of the inverter
// (0x174038900ad619200000747362521cbdaaf123471, inverse
// 0x483804df0018a66c3d0c3225d8d1abb598eba4cdc), 1, z, z^162, all ones and
// random operands. Each result is compared with the Fermat inverse
// a^(2^163-2) of gf_model_pkg and checked by a*dout = 1. The inverse of 0 is
// defined by this design as 0 and checked too. The number of cycles is
// data dependent; each run must finish within 4*163+4 cycles, and the
// largest count seen is printed. A watchdog ends a hung run.
module tb_inverse;
  import gf_model_pkg::*;

  localparam int NRAND  = 60;
  localparam int MAXCYC = 4 * M + 4;

  logic clk = 1'b0, rstn = 1'b0, start_valid = 1'b0;
  fe_t  a = '0, dout;
  logic out_valid;
  int   checks = 0, failures = 0, worst = 0;

  always #5 clk = ~clk;

  inverse dut (.clk, .rstn, .start_valid, .a, .dout, .out_valid);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(fe_t x);
    int cyc;
    fe_t exp_r;
    exp_r = (x == '0) ? '0 : inv(x);
    @(negedge clk);
    a = x; start_valid = 1'b1;
    @(negedge clk);
    start_valid = 1'b0; a = rand_fe();
    cyc = 1;
    while (!out_valid && cyc < 2 * MAXCYC) begin @(negedge clk); cyc++; end
    if (cyc > worst) worst = cyc;
    check($sformatf("inverse of %h = %h, got %h", x, exp_r, dout), dout == exp_r);
    if (x != '0) check("a * a^-1 = 1", mul(x, dout) == fe_t'(1));
    check($sformatf("finished in %0d cycles", cyc), cyc <= MAXCYC);
    repeat (2) @(negedge clk);
    check("result held", out_valid && dout == exp_r);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    run(fe_t'('h174038900ad619200000747362521cbdaaf123471));
    check("reference waveform vector",
          dout == fe_t'('h483804df0018a66c3d0c3225d8d1abb598eba4cdc));
    run(fe_t'(1)); run(fe_t'(2)); run(fe_t'(1) << (M - 1)); run('1); run('0);
    for (int i = 0; i < NRAND; i++) run(rand_fe());
    $display("longest inversion: %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NRAND + 10) * (MAXCYC + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
