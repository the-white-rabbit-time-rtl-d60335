// Sampling-clock drift meter.
//
// The PMU time of every sample strobe is noted; over each window of M sample
// intervals the measured span (t_M - t_0) is compared with its nominal length
// M*Ts, giving the normalised drift
//   f_D = ((t_M - t_0) - M*Ts) / (M*Ts)
// reported as a signed Q40 fraction (fd_q40 = f_D * 2^40, 1 LSB ~ 0.9e-12).
// Windows follow each other without gap: the last sample of one window is the
// first of the next. The window spans M intervals, i.e. M+1 samples, so that an
// ideal clock gives exactly zero; the Q40 format and the default window
// (M = 100000 samples, 2 s at 50 kHz) are this design's choices within the
// "few seconds" the design asks for. fd_q40 is updated two cycles after the
// closing sample and keeps its value in between; it is zero before the first
// window ends. restart (driven by a clock overwrite, which makes the PMU
// times of a window incomparable) abandons the open window; the next sample
// opens a new one. restart is this design's addition.
module clock_drift_meter
  import wr_pmu_pkg::*;
#(
  parameter int unsigned M     = 100_000,
  parameter int unsigned TS_NS = 20_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               sample_stb,
  input  pmu_time_t          t_pmu,
  output logic               fd_valid,
  output logic signed [47:0] fd_q40,
  output logic signed [31:0] span_err_ns
);

  localparam longint NOMINAL_NS = longint'(M) * longint'(TS_NS);

  pmu_time_t                     t_start;
  logic                          started;
  logic [$clog2(M+1)-1:0]        cnt;
  logic                          diff_valid;
  logic signed [63:0]            diff;
  logic signed [103:0]           quot;

  assign quot = (104'(diff) <<< 40) / 104'(NOMINAL_NS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_start     <= '0;
      started     <= 1'b0;
      cnt         <= '0;
      diff_valid  <= 1'b0;
      diff        <= '0;
      fd_valid    <= 1'b0;
      fd_q40      <= '0;
      span_err_ns <= '0;
    end else begin
      diff_valid <= 1'b0;
      fd_valid   <= 1'b0;
      if (restart) begin
        started <= 1'b0;
      end else if (sample_stb) begin
        if (!started) begin
          started <= 1'b1;
          t_start <= t_pmu;
          cnt     <= '0;
        end else if (cnt == ($bits(cnt))'(M - 1)) begin
          diff       <= time_diff_ns(t_pmu, t_start) - NOMINAL_NS;
          diff_valid <= 1'b1;
          t_start    <= t_pmu;
          cnt        <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (diff_valid) begin
        fd_valid    <= 1'b1;
        fd_q40      <= quot[47:0];
        span_err_ns <= diff[31:0];
      end
    end
  end

endmodule
