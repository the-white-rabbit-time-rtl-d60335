// Testbench of clock_drift_meter with a short window (M = 50 samples):
// sample strobes carry PMU times whose spacing is Ts * (1 + d) for a set of
// drifts d (0, +100 ppm, -37 ppm, +1250 ppm); every window's f_D must match
// ((t_M - t_0) - M*Ts) / (M*Ts) * 2^40, computed here in floating point.
`timescale 1ns/1ps
module tb_clock_drift_meter;
  import wr_pmu_pkg::*;
  localparam int M = 50;
  logic clk = 0, rst_n = 0, sample_stb = 0, restart = 0;
  pmu_time_t t_pmu;
  logic fd_valid;
  logic signed [47:0] fd_q40;
  logic signed [31:0] span_err_ns;
  int checks = 0, failures = 0, n_win = 0;
  real t_real, step, exp_fd;
  longint t_ns, t_first;

  clock_drift_meter #(.M(M), .TS_NS(20_000)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic pmu_time_t mk(longint t);
    pmu_time_t r;
    r.sec = 32'(t / 1_000_000_000);
    r.ns  = 30'(t % 1_000_000_000);
    return r;
  endfunction

  real drifts[4] = '{0.0, 100e-6, -37e-6, 1250e-6};

  initial begin
    t_real = 3.0e9 + 999_500_000.0;   // ns, crosses a second
    t_pmu = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // one continuous stream; sample n closes a window when n % M == 0
    for (int n = 0; n <= 12 * M; n++) begin
      int k;
      k = (n == 0) ? 0 : (n - 1) / (3 * M);
      step = 20_000.0 * (1.0 + drifts[k]);
      t_ns = longint'($floor(t_real));
      t_pmu = mk(t_ns); sample_stb = 1;
      @(posedge clk); #1 sample_stb = 0;
      repeat (3) @(posedge clk); #1;
      t_real += step;
      if (n == 0) t_first = t_ns;
      else if (n % M == 0) begin
        exp_fd = (real'(t_ns - t_first) - real'(M) * 20_000.0) / (real'(M) * 20_000.0) * (2.0 ** 40);
        chk(n_win == n / M, "one result per window");
        chk(real'(fd_q40) - exp_fd <= 1.0 && exp_fd - real'(fd_q40) <= 1.0,
            $sformatf("drift %e sample %0d: fd %0d expected %f", drifts[k], n, fd_q40, exp_fd));
        chk(longint'(span_err_ns) == t_ns - t_first - longint'(M) * 20_000, "span error");
        t_first = t_ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (fd_valid) n_win++;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
