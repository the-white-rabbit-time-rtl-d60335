// WR-PMU timing block: UTC time for a phasor measurement unit from a White
// Rabbit node, with a PI-disciplined internal clock and a-posteriori
// compensation of the free-running sampling process.
//
// Data flow (all in the 40 MHz FPGA clock domain, 25 ns per tick):
//   wr_time_retriever   polls the WR node every 20 us (trigger, wait, freeze,
//                       read) -> UTC-WR readings
//   pmu_time_error      adds the deterministic read delay and forms
//                       eps = T_WR-comp - T_PMU; first reading / large
//                       errors overwrite the clock instead
//   pi_controller       gamma = Kp*eps + sum sign(eps)   [fs per tick]
//   free_running_clock  T_PMU += 25 ns + gamma, via a femtosecond counter
//   subpps_gen          reporting-rate square wave locked to the UTC second
//   subpps_offset_meter t0 - t_subPPS at every subPPS
//   clock_drift_meter   sampling-clock drift f_D over M samples
//   freq_compensator    df_c = df(1-f_D), f_c = f(1-f_D)
//   phase_compensator   phi_c = phi_0 + 2*pi*f_c*(t0 - t_subPPS)
// The synchrophasor estimator itself is external: it receives subpps_rise to
// start a window and returns, per window, a frequency (uHz) and an initial
// phase (Q32 turns) on est_valid. The compensated result leaves on
// meas_valid, tagged with the frame time meas_time (the subPPS edge of the
// most recent window). Pairing each estimate with the latest offset and drift
// is this design's choice. The ADC sample strobe (sample_stb) is a one-cycle
// pulse in this clock domain, one per sample.
module wr_pmu_timing
  import wr_pmu_pkg::*;
#(
  parameter int unsigned TICK_NS          = 25,
  parameter int unsigned TRIG_PERIOD_CYC  = 800,
  parameter int unsigned WAIT_TIMEOUT_CYC = 600,
  parameter int unsigned T_DELAY_NS       = 3000,
  parameter int unsigned STEP_NS          = 1000,
  parameter int unsigned PI_AVG_NS        = 10_000_000,
  parameter int unsigned REPORT_RATE      = 50,
  parameter int unsigned DRIFT_M          = 100_000,
  parameter int unsigned TS_NS            = 20_000,
  parameter int unsigned WINDOW_US        = 60_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  // WR node
  output logic               wr_normal,
  output logic               wr_trig,
  output logic               wr_freeze,
  input  logic               wr_node_ready,
  input  pmu_time_t          wr_time,
  // ADC
  input  logic               sample_stb,
  // synchrophasor estimator
  output logic               subpps,
  output logic               subpps_rise,
  output pmu_time_t          t_subpps,
  input  logic               est_valid,
  input  logic [31:0]        est_freq_uhz,
  input  logic [31:0]        est_phase_q32,
  output logic               meas_valid,
  output pmu_time_t          meas_time,
  output logic [31:0]        meas_freq_uhz,
  output logic [31:0]        meas_phase_q32,
  // clock and status
  output pmu_time_t          t_pmu,
  output logic               locked,
  output logic signed [31:0] gamma_fs,
  output logic signed [31:0] integ_fs,
  output logic [19:0]        fs_cnt,
  output logic               fs_ovf,
  output logic               fs_unf,
  output logic signed [31:0] last_err_ns,
  output logic [15:0]        miss_count,
  output logic               offset_valid,
  output logic signed [31:0] offset_ns,
  output pmu_time_t          t0,
  output logic [15:0]        frame_idx,
  output logic               fd_valid,
  output logic signed [47:0] fd_q40,
  output logic signed [31:0] span_err_ns,
  output logic [31:0]        df_c_uhz
);

  pmu_time_t          utc_wr;
  logic               utc_wr_valid;
  logic               err_valid;
  logic signed [31:0] err_ns;
  logic               load;
  pmu_time_t          load_time;
  pmu_time_t          t_frame;
  logic               fc_valid;
  logic [31:0]        fc_uhz;
  logic signed [31:0] offset_hold;
  pmu_time_t          frame_hold;
  logic [31:0]        phase_q;
  pmu_time_t          frame_q;

  wr_time_retriever #(
    .TRIG_PERIOD_CYC (TRIG_PERIOD_CYC),
    .WAIT_TIMEOUT_CYC(WAIT_TIMEOUT_CYC)
  ) u_retriever (
    .clk, .rst_n, .enable,
    .wr_normal, .wr_trig, .wr_freeze, .wr_node_ready, .wr_time,
    .utc_wr, .utc_wr_valid, .miss_count
  );

  pmu_time_error #(
    .TICK_NS   (TICK_NS),
    .T_DELAY_NS(T_DELAY_NS),
    .STEP_NS   (STEP_NS)
  ) u_error (
    .clk, .rst_n, .utc_wr, .utc_wr_valid, .t_pmu,
    .err_valid, .err_ns, .load, .load_time, .locked
  );

  pi_controller #(
    .TICK_NS  (TICK_NS),
    .PI_AVG_NS(PI_AVG_NS)
  ) u_pi (
    .clk, .rst_n, .clear(load), .err_valid, .err_ns, .gamma_fs, .integ_fs
  );

  free_running_clock #(
    .TICK_NS(TICK_NS)
  ) u_clock (
    .clk, .rst_n, .load, .load_time, .gamma_fs, .t_pmu, .fs_cnt, .fs_ovf, .fs_unf
  );

  subpps_gen #(
    .REPORT_RATE(REPORT_RATE)
  ) u_subpps (
    .clk, .rst_n, .t_pmu, .subpps, .subpps_rise, .t_subpps, .frame_idx
  );

  subpps_offset_meter u_offset (
    .clk, .rst_n, .subpps_rise, .t_subpps, .sample_stb, .t_pmu,
    .offset_valid, .offset_ns, .t_frame, .t0
  );

  clock_drift_meter #(
    .M    (DRIFT_M),
    .TS_NS(TS_NS)
  ) u_drift (
    .clk, .rst_n, .restart(load), .sample_stb, .t_pmu, .fd_valid, .fd_q40, .span_err_ns
  );

  freq_compensator #(
    .WINDOW_US(WINDOW_US)
  ) u_freq (
    .clk, .rst_n, .fd_valid, .fd_q40,
    .f_valid(est_valid), .f_uhz(est_freq_uhz),
    .df_c_uhz, .fc_valid, .fc_uhz
  );

  // latest window offset and frame time, and the phase delayed to line up
  // with the compensated frequency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset_hold <= '0;
      frame_hold  <= '0;
      phase_q     <= '0;
      frame_q     <= '0;
      last_err_ns <= '0;
    end else begin
      if (offset_valid) begin
        offset_hold <= offset_ns;
        frame_hold  <= t_frame;
      end
      if (err_valid) last_err_ns <= err_ns;
      if (est_valid) begin
        phase_q <= est_phase_q32;
        frame_q <= frame_hold;
      end
    end
  end

  phase_compensator u_phase (
    .clk, .rst_n,
    .in_valid (fc_valid),
    .phi0_q32 (phase_q),
    .fc_uhz   (fc_uhz),
    .offset_ns(offset_hold),
    .out_valid(meas_valid),
    .phic_q32 (meas_phase_q32)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas_freq_uhz <= '0;
      meas_time     <= '0;
    end else if (fc_valid) begin
      meas_freq_uhz <= fc_uhz;
      meas_time     <= frame_q;
    end
  end

endmodule
