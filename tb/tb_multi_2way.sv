// tb_multi_2way: self-checking testbench of multi_2way, the 2-way Karatsuba multiplier.
//
// Drives the vector printed for this unit in the reference waveforms
// (a = 0xb, b = 0x174038900ad619200000747362521cbdaaf123471, whose product
// is 0x3c18d3049cae26000033f0eb466c02ba89a7ffd2), corner operands (0, 1,
// all ones, z^162) and random operands, and compares dout with the
// bit-by-bit reference product of gf_model_pkg. Every operation also checks
// the latency, 23 cycles from the cycle that holds start_valid to the
// first cycle that shows out_valid, and that the result is held afterwards.
// A watchdog ends the run if the unit hangs.
module tb_multi_2way;
  import gf_model_pkg::*;

  localparam int LAT    = 23;
  localparam bit LEVEL  = 1;   // out_valid held high until next start
  localparam int NRAND  = 200;

  logic clk = 1'b0, rstn = 1'b0, start_valid = 1'b0;
  fe_t  a = '0, b = '0, dout;
  logic out_valid;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  multi_2way dut (.clk, .rstn, .start_valid, .a, .b, .dout, .out_valid);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(fe_t x, fe_t y);
    int cyc;
    fe_t exp_r, held;
    exp_r = mul(x, y);
    @(negedge clk);
    a = x; b = y; start_valid = 1'b1;
    @(negedge clk);
    start_valid = 1'b0;
    a = rand_fe(); b = rand_fe();       // operands must have been sampled
    cyc = 1;
    while (!out_valid && cyc < 4 * LAT + 10) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("product %h * %h = %h, got %h", x, y, exp_r, dout), dout == exp_r);
    check($sformatf("latency %0d, expected %0d", cyc, LAT), cyc == LAT);
    held = dout;
    repeat (3) @(negedge clk);
    check("result held", dout == held && out_valid == LEVEL);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    check("idle after reset", out_valid == 1'b0);
    run(fe_t'('hb), fe_t'('h174038900ad619200000747362521cbdaaf123471));
    check("reference waveform vector",
          dout == fe_t'('h3c18d3049cae26000033f0eb466c02ba89a7ffd2));
    run('0, rand_fe());
    run(fe_t'(1), fe_t'('h174038900ad619200000747362521cbdaaf123471));
    run('1, '1);
    run(fe_t'(1) << (M - 1), fe_t'(1) << (M - 1));
    for (int i = 0; i < NRAND; i++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NRAND + 10) * (LAT + 8) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
