// Steady-state phase workload, the timing share of the 24-hour tests at
// 47.5, 50 and 52.5 Hz. A synchrophasor's phase error from timing is
// 2*pi*f*e, where e is the error of the PMU clock at the instant a sample is
// taken. Here the WR time runs a steady 2 ppm fast against the FPGA clock and
// each reading carries +-3.54 ns of jitter. After 25 ms of settling, e is
// taken at every ADC sample strobe for 200 ms (about 10,000 samples). It is
// the PMU time with its femtosecond fraction minus the true UTC time of the
// same cycle. Following the way the original tests report it, the mean is
// removed and the standard deviation is turned into a phase error at each
// frequency. That timing share must stay below the total phase deviation
// measured for the complete WR-PMU (7.8, 8 and 7.1 urad), and the mean error
// must stay under 5 ns. The harness also runs its usual clock, offset, drift
// and measurement checks through the run.
`timescale 1ns/1ps
module tb_wr_pmu_steady_state;
  import wr_pmu_pkg::*;
  logic clk, rst_n, enable, wr_normal, wr_trig, wr_freeze, wr_node_ready, sample_stb;
  pmu_time_t wr_time, t_subpps, meas_time, t_pmu, t0;
  logic subpps, subpps_rise, est_valid, meas_valid, locked, fs_ovf, fs_unf, offset_valid, fd_valid;
  logic [31:0] est_freq_uhz, est_phase_q32, meas_freq_uhz, meas_phase_q32, df_c_uhz;
  logic signed [31:0] gamma_fs, integ_fs, last_err_ns, offset_ns, span_err_ns;
  logic [19:0] fs_cnt;
  logic [15:0] miss_count, frame_idx;
  logic signed [47:0] fd_q40;

  wr_pmu_timing #(.DRIFT_M(200)) dut (.*);
  wr_pmu_harness #(.DRIFT_M(200), .RUN_MS(230), .FLIP_MS(1000), .JUMP_MS(1000),
                   .DRIFT1_FS(50), .DRIFT2_FS(50), .JITTER_PS(3540),
                   .ERR_BOUND_NS(30), .CHECK_EVENTS(0)) harness (.*);

  localparam longint START_CYC = 25 * 40_000;
  localparam longint END_CYC   = 225 * 40_000;

  int ext_checks = 0, ext_failures = 0, n = 0;
  longint cyc = 0;
  real s = 0, q = 0;

  // full-resolution times in fs since the model's start second
  function automatic longint pmu_fs();
    return ((longint'(t_pmu.sec) - 1_700_000_000) * 1_000_000_000 + longint'(t_pmu.ns))
           * 1_000_000 + longint'(fs_cnt);
  endfunction
  function automatic longint utc_fs();
    return (longint'(harness.utc_now.sec) - 1_700_000_000) * 64'd1_000_000_000_000_000
           + harness.utc_fs;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample_stb && cyc >= START_CYC && cyc < END_CYC) begin
      real e_ns;
      e_ns = real'(pmu_fs() - utc_fs()) / 1.0e6;
      s += e_ns;
      q += e_ns * e_ns;
      n++;
    end
  end

  task automatic check_phase(input real f_hz, input real sd_ns, input real limit_urad);
    real sd_urad;
    sd_urad = 2.0 * 3.141592653589793 * f_hz * sd_ns * 1.0e-9 * 1.0e6;
    $display("timing share of the phase deviation at %0.1f Hz: %0.3f urad (complete WR-PMU: %0.1f urad)",
             f_hz, sd_urad, limit_urad);
    ext_checks++;
    if (!(sd_urad < limit_urad)) begin
      ext_failures++;
      $display("FAIL phase deviation at %0.1f Hz", f_hz);
    end
  endtask

  initial begin
    real mean, sd;
    wait (cyc == END_CYC + 1);
    mean = s / n;
    sd   = $sqrt(q / n - mean * mean);
    $display("clock error at %0d sample instants: mean %0.3f ns, deviation %0.3f ns", n, mean, sd);
    ext_checks += 2;
    if (n < 9_900)                   begin ext_failures++; $display("FAIL only %0d samples", n); end
    if (!(mean < 5.0 && mean > -5.0)) begin ext_failures++; $display("FAIL mean clock error"); end
    check_phase(47.5, sd, 7.8);
    check_phase(50.0, sd, 8.0);
    check_phase(52.5, sd, 7.1);
  end

  // watchdog in case the harness never ends the run
  initial begin
    repeat (240 * 40_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ext_checks, ext_failures + 1);
    $finish;
  end
endmodule
