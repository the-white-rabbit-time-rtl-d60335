// subPPS generator.
//
// Derives from the PMU time a square wave at the reporting rate F_r
// (REPORT_RATE frames per second, 50 in the design), locked to the UTC
// second: the wave is high during the first half of each reporting period
// PERIOD_NS = 10^9 / F_r, so its first rising edge in a second is at the
// second rollover. The rising edge (subpps_rise, one cycle) triggers
// acquisition, estimation and time-stamping; t_subpps is the UTC time of that
// edge, i.e. the nominal frame time (second, ns rounded down to a multiple of
// PERIOD_NS), and frame_idx its index within the second. Deriving the wave from
// the disciplined PMU time, the 50 % duty cycle and the nominal edge time are
// this design's choices. Outputs are registered: they describe the PMU time of
// the previous cycle. REPORT_RATE must divide 10^9.
module subpps_gen
  import wr_pmu_pkg::*;
#(
  parameter int unsigned REPORT_RATE = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pmu_time_t  t_pmu,
  output logic       subpps,
  output logic       subpps_rise,
  output pmu_time_t  t_subpps,
  output logic [15:0] frame_idx
);

  localparam int unsigned PERIOD_NS = NS_PER_SEC / REPORT_RATE;

  logic [29:0] phase;
  logic [29:0] idx;
  logic        square;

  assign idx    = t_pmu.ns / 30'(PERIOD_NS);
  assign phase  = t_pmu.ns - idx * 30'(PERIOD_NS);
  assign square = (phase < 30'(PERIOD_NS / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      subpps      <= 1'b1;
      subpps_rise <= 1'b0;
      t_subpps    <= '0;
      frame_idx   <= '0;
    end else begin
      subpps      <= square;
      subpps_rise <= square && !subpps;
      if (square && !subpps) begin
        t_subpps.sec <= t_pmu.sec;
        t_subpps.ns  <= t_pmu.ns - phase;
        frame_idx    <= idx[15:0];
      end
    end
  end

endmodule
