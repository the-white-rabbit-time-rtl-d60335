// subPPS-to-sample offset meter.
//
// The sampling clock runs free, so the first sample of an estimation window is
// not aligned with the subPPS edge that opens it. At every subPPS rising edge
// this block arms itself with the edge time t_subPPS; the next sample strobe
// gives t0, the PMU time of that sample, and the block reports
//   offset_ns = t0 - t_subPPS
// which the phase compensation uses. The sample strobe and its PMU time are
// registered once on entry so that they line up with subpps_rise, which comes
// from a registered generator; a sample in the very cycle of the edge is thus
// taken as the first sample of the new window. The strobe interface is this
// design's choice. Output valid one cycle after the aligned sample.
module subpps_offset_meter
  import wr_pmu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               subpps_rise,
  input  pmu_time_t          t_subpps,
  input  logic               sample_stb,
  input  pmu_time_t          t_pmu,
  output logic               offset_valid,
  output logic signed [31:0] offset_ns,
  output pmu_time_t          t_frame,
  output pmu_time_t          t0
);

  logic       sample_q;
  pmu_time_t  t_sample_q;
  logic       armed;
  pmu_time_t  t_edge;
  pmu_time_t  edge_now;
  logic signed [63:0] d;

  assign edge_now = subpps_rise ? t_subpps : t_edge;
  assign d        = time_diff_ns(t_sample_q, edge_now);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q     <= 1'b0;
      t_sample_q   <= '0;
      armed        <= 1'b0;
      t_edge       <= '0;
      offset_valid <= 1'b0;
      offset_ns    <= '0;
      t_frame      <= '0;
      t0           <= '0;
    end else begin
      sample_q     <= sample_stb;
      t_sample_q   <= t_pmu;
      offset_valid <= 1'b0;
      if (subpps_rise) t_edge <= t_subpps;
      if (sample_q && (armed || subpps_rise)) begin
        offset_valid <= 1'b1;
        offset_ns    <= d[31:0];
        t_frame      <= edge_now;
        t0           <= t_sample_q;
        armed        <= 1'b0;
      end else if (subpps_rise) begin
        armed <= 1'b1;
      end
    end
  end

endmodule
