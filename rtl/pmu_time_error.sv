// PMU time error: compares each new UTC-WR reading with the internal clock.
//
// A reading counts as new only when it differs from the previous one
// (T_WR(n) != T_WR(n-1)). The reading reaches this block a fixed time after
// the instant it describes; that deterministic delay T_DELAY_NS is added
// first (T_WR-comp = T_WR + T_delay), so that the reading is compared with the
// internal clock T_PMU of the same cycle: eps = T_WR-comp - T_PMU, in ns.
//
// Outputs, registered, one cycle after the reading:
//   err_valid/err_ns - the error for the PI controller (|eps| <= STEP_NS)
//   load/load_time   - overwrite request: the first reading after reset, or a
//                      reading whose error exceeds STEP_NS, sets the internal
//                      clock directly; load_time is the time of the cycle in
//                      which load is high.
// The overwrite-on-large-error rule, STEP_NS and the value of T_DELAY_NS are
// this design's choices; the design only states that the delay is
// deterministic, of a few microseconds, and compensated.
module pmu_time_error
  import wr_pmu_pkg::*;
#(
  parameter int unsigned TICK_NS    = 25,
  parameter int unsigned T_DELAY_NS = 3000,
  parameter int unsigned STEP_NS    = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pmu_time_t          utc_wr,
  input  logic               utc_wr_valid,
  input  pmu_time_t          t_pmu,
  output logic               err_valid,
  output logic signed [31:0] err_ns,
  output logic               load,
  output pmu_time_t          load_time,
  output logic               locked
);

  pmu_time_t          prev_wr;
  logic               have_prev;
  logic               is_new;
  pmu_time_t          wr_comp;
  logic signed [63:0] diff;
  logic               too_big;

  assign is_new  = utc_wr_valid && (!have_prev || (utc_wr != prev_wr));
  assign wr_comp = time_add_ns(utc_wr, 32'(T_DELAY_NS));
  assign diff    = time_diff_ns(wr_comp, t_pmu);
  assign too_big = (diff > longint'(STEP_NS)) || (diff < -longint'(STEP_NS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_wr   <= '0;
      have_prev <= 1'b0;
      err_valid <= 1'b0;
      err_ns    <= '0;
      load      <= 1'b0;
      load_time <= '0;
      locked    <= 1'b0;
    end else begin
      err_valid <= 1'b0;
      load      <= 1'b0;
      if (is_new) begin
        prev_wr   <= utc_wr;
        have_prev <= 1'b1;
        if (!locked || too_big) begin
          load      <= 1'b1;
          load_time <= time_add_ns(wr_comp, 32'(TICK_NS));
          locked    <= 1'b1;
        end else begin
          err_valid <= 1'b1;
          err_ns    <= diff[31:0];
        end
      end
    end
  end

endmodule
