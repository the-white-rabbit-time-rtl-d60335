// Full-size end-to-end test of wr_pmu_timing: every parameter at its default,
// including the 100000-sample (2 s) drift window, over 2.2 s of simulated
// time with a 2 ppm / -3 ppm WR frequency offset, a missed trigger and a
// 10 us time step at 2.05 s; see wr_pmu_harness for the models and checks.
`timescale 1ns/1ps
module tb_wr_pmu_timing_full;
  import wr_pmu_pkg::*;
  logic clk, rst_n, enable, wr_normal, wr_trig, wr_freeze, wr_node_ready, sample_stb;
  pmu_time_t wr_time, t_subpps, meas_time, t_pmu, t0;
  logic subpps, subpps_rise, est_valid, meas_valid, locked, fs_ovf, fs_unf, offset_valid, fd_valid;
  logic [31:0] est_freq_uhz, est_phase_q32, meas_freq_uhz, meas_phase_q32, df_c_uhz;
  logic signed [31:0] gamma_fs, integ_fs, last_err_ns, offset_ns, span_err_ns;
  logic [19:0] fs_cnt;
  logic [15:0] miss_count, frame_idx;
  logic signed [47:0] fd_q40;
  int ext_checks = 0, ext_failures = 0;

  wr_pmu_timing dut (.*);
  wr_pmu_harness #(.DRIFT_M(100_000), .RUN_MS(2200), .FLIP_MS(1000), .JUMP_MS(2050)) harness (.*);
endmodule
