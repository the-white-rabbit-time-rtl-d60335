// End-to-end harness for wr_pmu_timing (the DUT is instantiated by the
// testbench that uses this harness and connected port by port).
//
// Models around the DUT:
//   - wr_node_model: WR time with a frequency offset against the FPGA clock
//     (+2 ppm, then -3 ppm), optional jitter, one unanswered trigger and one
//     10 us step of UTC time;
//   - an ADC whose sample strobes come every 20 us * (1 + 500 ppm) of FPGA
//     time;
//   - a synchrophasor estimator that answers each subPPS edge with a
//     frequency and a phase.
// Checks, against the model's true UTC time:
//   - |T_PMU - UTC| stays below ERR_BOUND_NS once settled;
//   - every subPPS offset equals UTC(first sample) - UTC(frame boundary)
//     within the clock error;
//   - every drift result equals the drift measured on true UTC times;
//   - every compensated measurement carries f(1 - f_D) and
//     phi + 2*pi*f_c*offset and the right frame time.
// Each mechanism (lock, overwrite on a step, PI update, femtosecond
// overflow and underflow, missed trigger, subPPS edge, offset, drift window,
// compensated measurement) is counted and must occur at least once.
`timescale 1ns/1ps
module wr_pmu_harness
  import wr_pmu_pkg::*;
#(
  parameter int DRIFT_M      = 200,
  parameter int RUN_MS       = 120,
  parameter int FLIP_MS      = 40,
  parameter int JUMP_MS      = 80,
  parameter int DRIFT1_FS    = 50,    // WR vs FPGA clock offset, fs per tick (+2 ppm)
  parameter int DRIFT2_FS    = -75,   // after FLIP_MS (-3 ppm)
  parameter int T_DELAY_NS   = 3000,
  parameter int JITTER_PS    = 0,
  parameter bit CHECK_EVENTS = 1,
  parameter int ERR_BOUND_NS = 50
) (
  output logic               clk,
  output logic               rst_n,
  output logic               enable,
  input  logic               wr_normal,
  input  logic               wr_trig,
  input  logic               wr_freeze,
  output logic               wr_node_ready,
  output pmu_time_t          wr_time,
  output logic               sample_stb,
  input  logic               subpps,
  input  logic               subpps_rise,
  input  pmu_time_t          t_subpps,
  output logic               est_valid,
  output logic [31:0]        est_freq_uhz,
  output logic [31:0]        est_phase_q32,
  input  logic               meas_valid,
  input  pmu_time_t          meas_time,
  input  logic [31:0]        meas_freq_uhz,
  input  logic [31:0]        meas_phase_q32,
  input  pmu_time_t          t_pmu,
  input  logic               locked,
  input  logic signed [31:0] gamma_fs,
  input  logic signed [31:0] integ_fs,
  input  logic [19:0]        fs_cnt,
  input  logic               fs_ovf,
  input  logic               fs_unf,
  input  logic signed [31:0] last_err_ns,
  input  logic [15:0]        miss_count,
  input  logic               offset_valid,
  input  logic signed [31:0] offset_ns,
  input  pmu_time_t          t0,
  input  logic [15:0]        frame_idx,
  input  logic               fd_valid,
  input  logic signed [47:0] fd_q40,
  input  logic signed [31:0] span_err_ns,
  input  logic [31:0]        df_c_uhz,
  // checks made by the testbench around the harness, added to the result
  input  int                 ext_checks,
  input  int                 ext_failures
);
  localparam longint CYC_PER_MS = 40_000;
  localparam longint RUN_CYC    = longint'(RUN_MS) * CYC_PER_MS;
  localparam longint JUMP_CYC   = longint'(JUMP_MS) * CYC_PER_MS;
  localparam longint FLIP_CYC   = longint'(FLIP_MS) * CYC_PER_MS;
  localparam longint MUTE_CYC   = 5 * CYC_PER_MS;
  localparam longint SETTLE_CYC = 25 * CYC_PER_MS;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ------------------------------------------------------------ clock, reset
  initial begin clk = 0; forever #12.5 clk = ~clk; end
  initial begin
    rst_n = 0; enable = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1; enable <= 1;
  end
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ WR node
  int drift_fs = DRIFT1_FS, jump_ns = 0;
  bit mute = 0;
  pmu_time_t utc_now;
  longint utc_fs;
  wr_node_model #(.LAT_CYC(T_DELAY_NS / 25 - 2), .JITTER_PS(JITTER_PS)) u_node (
    .clk, .rst_n, .wr_trig, .wr_freeze, .wr_node_ready, .wr_time,
    .drift_fs, .mute, .jump_ns, .utc_now, .utc_fs_in_sec(utc_fs)
  );
  always @(posedge clk) begin
    mute     <= (cyc >= MUTE_CYC && cyc < MUTE_CYC + 800);
    drift_fs <= (cyc >= FLIP_CYC) ? DRIFT2_FS : DRIFT1_FS;
    jump_ns  <= (cyc == JUMP_CYC) ? 10_000 : 0;
  end

  // true UTC in ns since the model's start second (fits a longint)
  function automatic longint utc_ns();
    return (longint'(utc_now.sec) - 1_700_000_000) * 1_000_000_000 + utc_fs / 1_000_000;
  endfunction
  function automatic longint as_ns(pmu_time_t t);
    return (longint'(t.sec) - 1_700_000_000) * 1_000_000_000 + longint'(t.ns);
  endfunction

  // ------------------------------------------------------------ clock error
  longint err, max_err = 0, prev_pmu = 0, err_sum = 0, err_n = 0;
  int n_lock = 0, n_step = 0, n_pi = 0, n_ovf = 0, n_unf = 0;
  bit locked_q = 0, restart_ref = 0;
  longint last_load_cyc = -1;
  logic signed [31:0] gamma_q = 0;
  always @(posedge clk) if (rst_n) begin
    err = as_ns(t_pmu) - utc_ns();
    if (jump_ns != 0) last_load_cyc = cyc;   // disturbance: settle again
    if (locked && !locked_q) begin n_lock++; last_load_cyc = cyc; restart_ref = 1; end
    else if (locked && cyc - last_load_cyc > 2 &&
             (as_ns(t_pmu) - prev_pmu > 26 || as_ns(t_pmu) - prev_pmu < 24)) begin
      n_step++; last_load_cyc = cyc; restart_ref = 1;
    end
    if (locked && last_load_cyc >= 0 && cyc - last_load_cyc > SETTLE_CYC) begin
      if (err > max_err) max_err = err;
      if (-err > max_err) max_err = -err;
      err_sum += err; err_n++;
      if (err > ERR_BOUND_NS || err < -ERR_BOUND_NS || cyc % 800 == 0)
        chk(err <= ERR_BOUND_NS && err >= -ERR_BOUND_NS, $sformatf("clock error %0d ns (pmu %0d.%09d utc %0d.%09d fs %0d)", err, t_pmu.sec, t_pmu.ns, utc_now.sec, utc_now.ns, utc_fs));
    end
    if (gamma_fs != gamma_q) n_pi++;
    gamma_q  = gamma_fs;
    if (fs_ovf) n_ovf++;
    if (fs_unf) n_unf++;
    locked_q = locked;
    prev_pmu = as_ns(t_pmu);
  end

  // ------------------------------------------------------------ ADC model
  // sample n falls at FPGA time n * 20 us * (1 + 500e-6)
  longint next_sample_ps = 1_000_000;
  longint now_ps;
  longint stb_utc_q[$];
  always @(posedge clk) begin
    now_ps = cyc * 25_000;
    sample_stb <= 1'b0;
    if (now_ps >= next_sample_ps) begin
      sample_stb     <= 1'b1;
      next_sample_ps += 20_010_000;
    end
  end

  // ------------------------------------------------------------ offsets
  // reference: first strobe at or after each true 20 ms boundary
  longint last_bnd = -1, ref_off_q[$];
  bit want = 0;
  int n_sub = 0, n_off = 0;
  always @(posedge clk) if (rst_n) begin
    longint u, b;
    u = utc_ns();
    b = (u / 20_000_000) * 20_000_000;
    if (b != last_bnd) begin
      if (last_bnd >= 0) want = 1;
      last_bnd = b;
    end
    if (sample_stb && want && locked) begin
      ref_off_q.push_back(u - b);
      want = 0;
    end
    if (subpps_rise) n_sub++;
    if (offset_valid) begin
      n_off++;
      // match on the frame: drop references older than this frame
      if (ref_off_q.size() > 0) begin
        longint r;
        r = ref_off_q.pop_front();
        if (cyc - last_load_cyc > SETTLE_CYC)
          chk(offset_ns - r <= ERR_BOUND_NS + 1 && r - offset_ns <= ERR_BOUND_NS + 1,
              $sformatf("offset %0d reference %0d", offset_ns, r));
      end
      ref_off_q.delete();
    end
  end

  // ------------------------------------------------------------ drift
  int n_smp = 0, n_fd = 0;
  longint win_start_utc = 0, win_span_q[$];
  always @(posedge clk) if (rst_n) begin
    if (restart_ref) begin
      n_smp = 0;
      win_span_q.delete();
      restart_ref = 0;
    end
    if (sample_stb) begin
      if (n_smp == 0) win_start_utc = utc_ns();
      else if (n_smp % DRIFT_M == 0) begin
        win_span_q.push_back(utc_ns() - win_start_utc);
        win_start_utc = utc_ns();
      end
      n_smp++;
    end
    if (fd_valid) begin
      real fd_ref, fd_dut, tol;
      n_fd++;
      if (win_span_q.size() == 0) chk(0, "drift result without window");
      else begin
        fd_ref = real'(win_span_q.pop_front() - longint'(DRIFT_M) * 20_000) / (real'(DRIFT_M) * 20_000.0);
        fd_dut = real'(fd_q40) / (2.0 ** 40);
        tol = real'(2 * ERR_BOUND_NS + 2) / (real'(DRIFT_M) * 20_000.0);
        chk(fd_dut - fd_ref <= tol && fd_ref - fd_dut <= tol,
            $sformatf("drift %e reference %e", fd_dut, fd_ref));
      end
    end
  end

  // ------------------------------------------------------------ estimator
  int n_est = 0, n_meas = 0, est_wait = -1;
  logic [31:0] f_sent, ph_sent;
  pmu_time_t   frame_sent;
  logic signed [31:0] off_at_est;
  logic signed [47:0] fd_at_est;
  always @(posedge clk) begin
    est_valid <= 1'b0;
    if (!rst_n) begin
      est_freq_uhz <= '0; est_phase_q32 <= '0;
    end else begin
      if (subpps_rise) est_wait = 3000;
      else if (est_wait > 0) est_wait--;
      if (est_wait == 0) begin
        est_wait = -1;
        f_sent   = 32'(47_500_000 + $urandom_range(0, 5_000_000));
        ph_sent  = $urandom;
        est_valid     <= 1'b1;
        est_freq_uhz  <= f_sent;
        est_phase_q32 <= ph_sent;
        frame_sent = t_subpps;
        off_at_est = offset_ns;
        fd_at_est  = fd_q40;
        n_est++;
      end
    end
  end
  always @(posedge clk) if (rst_n && meas_valid) begin
    real fc, dph;
    longint d;
    n_meas++;
    fc  = real'(f_sent) * (1.0 - real'(fd_at_est) / (2.0 ** 40));
    dph = fc * 1e-6 * real'(off_at_est) * 1e-9 * (2.0 ** 32);
    d   = longint'(meas_phase_q32) - (longint'(ph_sent) + longint'($floor(dph + 0.5)));
    d   = ((d % (64'sd1 <<< 32)) + (64'sd1 <<< 32)) % (64'sd1 <<< 32);
    if (d > (64'sd1 <<< 31)) d -= (64'sd1 <<< 32);
    chk(real'(meas_freq_uhz) - fc <= 1.0 && fc - real'(meas_freq_uhz) <= 1.0,
        $sformatf("compensated frequency %0d expected %f", meas_freq_uhz, fc));
    chk(d <= 2 && d >= -2, $sformatf("compensated phase off by %0d", d));
    chk(meas_time == frame_sent, "measurement frame time");
  end

  // ------------------------------------------------------------ end
  initial begin
    wait (rst_n);
    while (cyc < RUN_CYC) @(posedge clk);
    chk(n_lock >= 1,      "lock happened");
    if (CHECK_EVENTS) begin
    chk(n_step >= 1,      "overwrite on a time step happened");
    chk(n_pi >= 10,       "PI corrections happened");
    chk(n_ovf >= 1,       "femtosecond overflow happened");
    chk(n_unf >= 1,       "femtosecond underflow happened");
    chk(miss_count >= 1,  "missed trigger happened");
    chk(n_sub >= RUN_MS / 20 - 1, "subPPS edges");
    chk(n_off >= 1,       "offset measured");
    chk(n_fd >= 1,        "drift window completed");
    chk(n_meas >= 1 && n_meas == n_est, "compensated measurements");
    end
    chk(err_n > 0,        "clock error observed after settling");
    $display("events: lock=%0d step=%0d pi=%0d fs_ovf=%0d fs_unf=%0d miss=%0d subpps=%0d offsets=%0d drift=%0d meas=%0d",
             n_lock, n_step, n_pi, n_ovf, n_unf, miss_count, n_sub, n_off, n_fd, n_meas);
    $display("clock error after settling: max |T_PMU-UTC| = %0d ns, mean = %0.2f ns over %0d cycles",
             max_err, real'(err_sum) / real'(err_n > 0 ? err_n : 1), err_n);
    checks += ext_checks; failures += ext_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYC + 100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
