// Testbench of pi_controller: random errors; the reference keeps its own
// integrator (+-1 fs per error by sign) and proportional part Kp = 2.5 fs per
// tick per ns (10 ms averaging at 25 ns ticks), floor-rounded, and the clamp
// to +-999999 fs. Also checks hold between errors and clear.
`timescale 1ns/1ps
module tb_pi_controller;
  logic clk = 0, rst_n = 0, clear = 0, err_valid = 0;
  logic signed [31:0] err_ns, gamma_fs, integ_fs;
  int checks = 0, failures = 0;
  longint ref_i, ref_g, p;

  pi_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic step(input int e);
    err_ns = e; err_valid = 1;
    @(posedge clk); #1 err_valid = 0;
    if (e > 0) ref_i++; else if (e < 0) ref_i--;
    p = (longint'(e) * 5);
    p = (p >= 0) ? p / 2 : -((-p + 1) / 2);   // floor(2.5 * e)
    ref_g = p + ref_i;
    if (ref_g > 999999) ref_g = 999999;
    if (ref_g < -999999) ref_g = -999999;
    chk(longint'(gamma_fs) == ref_g, $sformatf("err %0d: gamma %0d expected %0d", e, gamma_fs, ref_g));
    chk(longint'(integ_fs) == ref_i, "integrator");
  endtask

  initial begin
    ref_i = 0; err_ns = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(gamma_fs == 0, "gamma zero after reset");
    for (int i = 0; i < 30; i++) step(7);          // integrator ramps up
    for (int i = 0; i < 200; i++) step(int'($urandom_range(0, 4000)) - 2000);
    step(0);
    step(-3);
    step(500_000);                                  // clamped
    step(-500_000);
    repeat (5) @(posedge clk);
    chk(longint'(gamma_fs) == ref_g, "gamma held between errors");
    clear = 1; @(posedge clk); #1 clear = 0;
    ref_i = 0;
    chk(gamma_fs == 0 && integ_fs == 0, "clear");
    step(-4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
