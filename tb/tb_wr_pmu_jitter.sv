// Jitter workload: the WR time read from the node carries a uniform random
// jitter of +-3.54 ns (a step standard deviation of about 2.89 ns, the WR
// value reported for the original system). After 25 ms of settling, the time
// steps between 1000 successive triggers are collected both for the WR
// readings T_WR and for the PMU clock T_PMU sampled at the triggers, and
// their standard deviations are printed. The PMU clock must show a smaller
// step jitter than the WR readings and stay within 30 ns of UTC.
`timescale 1ns/1ps
module tb_wr_pmu_jitter;
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
  wr_pmu_harness #(.DRIFT_M(200), .RUN_MS(50), .FLIP_MS(1000), .JUMP_MS(1000),
                   .JITTER_PS(3540), .ERR_BOUND_NS(30), .CHECK_EVENTS(0)) harness (.*);

  int n_wr = 0, n_pmu = 0, ext_checks = 0, ext_failures = 0;
  bit done = 0;
  longint prev_wr = -1, prev_pmu = -1, cyc = 0;
  real s_wr = 0, q_wr = 0, s_pmu = 0, q_pmu = 0, sd_wr, sd_pmu;
  bit trig_q = 0;

  function automatic longint as_ns(pmu_time_t t);
    return (longint'(t.sec) - 1_700_000_000) * 1_000_000_000 + longint'(t.ns);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    trig_q <= wr_trig;
    if (cyc > 25 * 40_000) begin
      if (wr_trig && !trig_q && n_pmu < 1000) begin
        if (prev_pmu >= 0) begin
          s_pmu += real'(as_ns(t_pmu) - prev_pmu);
          q_pmu += real'(as_ns(t_pmu) - prev_pmu) ** 2;
          n_pmu++;
        end
        prev_pmu = as_ns(t_pmu);
      end
      if (wr_freeze && n_wr < 1000) begin
        if (prev_wr >= 0) begin
          s_wr += real'(as_ns(wr_time) - prev_wr);
          q_wr += real'(as_ns(wr_time) - prev_wr) ** 2;
          n_wr++;
        end
        prev_wr = as_ns(wr_time);
      end
    end
  end

  always @(posedge clk) if (!done && n_wr == 1000 && n_pmu == 1000) begin
    done = 1;
    sd_wr  = $sqrt(q_wr  / n_wr  - (s_wr  / n_wr ) ** 2);
    sd_pmu = $sqrt(q_pmu / n_pmu - (s_pmu / n_pmu) ** 2);
    $display("step jitter over 1000 trigger intervals: T_WR %0.2f ns, T_PMU %0.2f ns", sd_wr, sd_pmu);
    ext_checks += 3;
    if (!(sd_wr > 2.4 && sd_wr < 3.4)) begin ext_failures++; $display("FAIL WR step jitter"); end
    if (!(sd_pmu < sd_wr / 2.0))       begin ext_failures++; $display("FAIL PMU step jitter"); end
    if (!(s_pmu / n_pmu > 19_999.0 && s_pmu / n_pmu < 20_001.0)) begin
      ext_failures++; $display("FAIL mean PMU step %f", s_pmu / n_pmu);
    end
  end

  initial begin
    repeat (49 * 40_000) @(posedge clk);
    ext_checks++;
    if (!done) begin ext_failures++; $display("FAIL fewer than 1000 intervals"); end
  end

  // watchdog in case the harness never ends the run
  initial begin
    repeat (60 * 40_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ext_checks, ext_failures + 1);
    $finish;
  end
endmodule
