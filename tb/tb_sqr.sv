// tb_sqr: self-checking testbench of sqr, the one-cycle squarer.
//
// Drives the operand printed in the reference waveform of the squarer
// (0x174038900ad619200000747362521cbdaaf123471, square
// 0x5de27056fea4024077b0787db35118104051015c8), corner operands and random
// operands, and compares dout with the reference product a*a of
// gf_model_pkg. Checks the one-cycle latency, that out_valid is a one-cycle
// pulse and that dout holds afterwards. A watchdog ends a hung run.
module tb_sqr;
  import gf_model_pkg::*;

  localparam int NRAND = 300;

  logic clk = 1'b0, rstn = 1'b0, start_valid = 1'b0;
  fe_t  a = '0, dout;
  logic out_valid;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sqr dut (.clk, .rstn, .start_valid, .a, .dout, .out_valid);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(fe_t x);
    fe_t exp_r;
    exp_r = sq(x);
    @(negedge clk);
    a = x; start_valid = 1'b1;
    @(negedge clk);
    start_valid = 1'b0; a = rand_fe();
    check("out_valid one cycle after start", out_valid == 1'b1);
    check($sformatf("square of %h = %h, got %h", x, exp_r, dout), dout == exp_r);
    @(negedge clk);
    check("out_valid is a pulse, dout held", out_valid == 1'b0 && dout == exp_r);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    run(fe_t'('h174038900ad619200000747362521cbdaaf123471));
    check("reference waveform vector",
          dout == fe_t'('h5de27056fea4024077b0787db35118104051015c8));
    run('0); run(fe_t'(1)); run('1); run(fe_t'(1) << (M - 1));
    for (int i = 0; i < NRAND; i++) run(rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
