// Testbench of phase_compensator: random phases, frequencies in 45..55 Hz and
// offsets of +-25 us; phi_c = phi_0 + 2*pi*f*dt is formed in floating point,
// in Q32 turns modulo 2^32, and must agree within 2 LSB. Includes the pure
// cases dt = 0 and f = 50 Hz, dt = 5 ms (a quarter turn).
`timescale 1ns/1ps
module tb_phase_compensator;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] phi0_q32 = 0, fc_uhz = 0, phic_q32;
  logic signed [31:0] offset_ns = 0;
  int checks = 0, failures = 0;
  real turns, ref_q;
  longint diff;

  phase_compensator dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(input logic [31:0] ph, input logic [31:0] f, input int dt);
    phi0_q32 = ph; fc_uhz = f; offset_ns = dt; in_valid = 1;
    @(posedge clk); #1 in_valid = 0;
    turns = real'(f) * 1e-6 * real'(dt) * 1e-9;       // 2*pi*f*dt / (2*pi)
    ref_q = real'(ph) + turns * (2.0 ** 32);
    diff  = (longint'(phic_q32) - longint'($floor(ref_q + 0.5))) % (64'sd1 <<< 32);
    if (diff > (64'sd1 <<< 31)) diff -= (64'sd1 <<< 32);
    if (diff < -(64'sd1 <<< 31)) diff += (64'sd1 <<< 32);
    chk(out_valid, "valid after one cycle");
    chk(diff <= 2 && diff >= -2, $sformatf("phi_c %0d expected %f (f %0d dt %0d)", phic_q32, ref_q, f, dt));
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(32'd123456, 32'd50_000_000, 0);
    run(32'd0, 32'd50_000_000, 5_000_000);           // quarter turn
    chk(phic_q32 == 32'h4000_0000, "quarter turn exact");
    for (int i = 0; i < 300; i++)
      run($urandom, 32'(45_000_000 + $urandom_range(0, 10_000_000)),
          int'($urandom_range(0, 50_000)) - 25_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
