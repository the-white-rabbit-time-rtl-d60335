// Testbench of freq_compensator: random drifts (within +-2000 ppm) and
// frequency estimates in 45..55 Hz; df_c = df (1 - f_D) with df = 1/60 ms and
// f_c = f (1 - f_D) are computed in floating point and must agree within
// 1 uHz. Also checks the reset value of df_c and the one-cycle latency.
`timescale 1ns/1ps
module tb_freq_compensator;
  logic clk = 0, rst_n = 0, fd_valid = 0, f_valid = 0;
  logic signed [47:0] fd_q40 = 0;
  logic [31:0] f_uhz = 0, df_c_uhz, fc_uhz;
  logic fc_valid;
  int checks = 0, failures = 0;
  real fd, df_ref, fc_ref;

  freq_compensator dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b <= 1.0) && (b - a <= 1.0);
  endfunction

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(near(real'(df_c_uhz), 1.0e12 / 60_000.0), "df at reset");
    for (int i = 0; i < 200; i++) begin
      fd = (real'($urandom_range(0, 4000)) - 2000.0) * 1e-6;
      fd_q40 = 48'($rtoi(fd * (2.0 ** 40)));
      fd = real'(fd_q40) / (2.0 ** 40);
      fd_valid = 1;
      @(posedge clk); #1 fd_valid = 0;
      df_ref = (1.0e12 / 60_000.0) * (1.0 - fd);
      chk(near(real'(df_c_uhz), df_ref), $sformatf("df_c %0d expected %f", df_c_uhz, df_ref));
      f_uhz = 32'(45_000_000 + $urandom_range(0, 10_000_000));
      f_valid = 1;
      @(posedge clk); #1 f_valid = 0;
      fc_ref = real'(f_uhz) * (1.0 - fd);
      chk(fc_valid, "valid after one cycle");
      chk(near(real'(fc_uhz), fc_ref), $sformatf("f_c %0d expected %f", fc_uhz, fc_ref));
      @(posedge clk); #1;
      chk(!fc_valid, "single-cycle valid");
    end
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
