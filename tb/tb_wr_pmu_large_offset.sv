// Stress test of the clock discipline: the WR time runs 50 ppm fast against
// the FPGA clock for 100 ms, then 50 ppm slow for another 100 ms. The PI loop
// (10 ms proportional averaging, 1 fs integrator steps) needs tens of
// milliseconds to absorb such offsets and overshoots in between; the PMU
// clock must nevertheless stay within 1 us of UTC throughout, so that no
// overwrite is ever needed. Prints the largest error seen.
`timescale 1ns/1ps
module tb_wr_pmu_large_offset;
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

  wr_pmu_timing #(.DRIFT_M(200)) dut (.*);
  wr_pmu_harness #(.DRIFT_M(200), .RUN_MS(200), .FLIP_MS(100), .JUMP_MS(1000),
                   .DRIFT1_FS(1250), .DRIFT2_FS(-1250), .ERR_BOUND_NS(999),
                   .CHECK_EVENTS(0)) harness (.*);

  // no overwrite may happen after the first lock: the PMU time always
  // advances by 24, 25 or 26 ns
  longint prev = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    longint now;
    cyc <= cyc + 1;
    now = (longint'(t_pmu.sec) - 1_700_000_000) * 1_000_000_000 + longint'(t_pmu.ns);
    if (locked && prev >= 0 && cyc > 1000 && cyc % 100 == 0) ext_checks++;
    if (locked && prev >= 0 && cyc > 1000 && (now - prev > 26 || now - prev < 24)) begin
      ext_checks++; ext_failures++;
      $display("FAIL clock overwritten at cycle %0d", cyc);
    end
    prev = now;
  end

  initial begin
    repeat (210 * 40_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ext_checks, ext_failures + 1);
    $finish;
  end
endmodule
