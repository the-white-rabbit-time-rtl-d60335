// Internal free-running clock of the PMU.
//
// Second, nanosecond and femtosecond counters, advanced on every tick of the
// FPGA clock: T_PMU(n+1) = T_PMU(n) + dT + gamma(n), dT = TICK_NS = 25 ns.
// The correction gamma (fs, signed, |gamma| < 10^6) is added to the
// femtosecond counter only; the nanosecond counter moves by one extra ns on a
// femtosecond overflow and by one ns less on an underflow, so T_PMU (seconds
// and nanoseconds) is corrected only then. The nanosecond counter wraps into
// the second counter at 10^9.
// load overwrites the clock: load_time is taken as the time of the current
// cycle (the femtosecond residue is cleared) and the clock continues from it.
// Outputs are registered; fs_ovf / fs_unf flag the cycles whose advance
// included a femtosecond carry or borrow.
module free_running_clock
  import wr_pmu_pkg::*;
#(
  parameter int unsigned TICK_NS = 25
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  pmu_time_t          load_time,
  input  logic signed [31:0] gamma_fs,
  output pmu_time_t          t_pmu,
  output logic [19:0]        fs_cnt,
  output logic               fs_ovf,
  output logic               fs_unf
);

  pmu_time_t          base;
  logic signed [31:0] fs_base, fs_sum, gamma_use;
  logic signed [31:0] carry;
  logic        [31:0] ns_sum;
  pmu_time_t          t_next;
  logic        [19:0] fs_next;

  always_comb begin
    base      = load ? load_time : t_pmu;
    fs_base   = load ? 32'sd0 : $signed({12'd0, fs_cnt});
    gamma_use = load ? 32'sd0 : gamma_fs;
    fs_sum    = fs_base + gamma_use;
    carry     = 32'sd0;
    if (fs_sum >= $signed(FS_PER_NS)) begin
      fs_sum = fs_sum - $signed(FS_PER_NS);
      carry  = 32'sd1;
    end else if (fs_sum < 0) begin
      fs_sum = fs_sum + $signed(FS_PER_NS);
      carry  = -32'sd1;
    end
    fs_next  = fs_sum[19:0];
    ns_sum   = 32'({2'b00, base.ns}) + 32'(TICK_NS) + 32'(carry);
    t_next.sec = base.sec;
    if (ns_sum >= NS_PER_SEC) begin
      ns_sum     = ns_sum - NS_PER_SEC;
      t_next.sec = base.sec + 32'd1;
    end
    t_next.ns = ns_sum[29:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_pmu  <= '0;
      fs_cnt <= '0;
      fs_ovf <= 1'b0;
      fs_unf <= 1'b0;
    end else begin
      t_pmu  <= t_next;
      fs_cnt <= fs_next;
      fs_ovf <= (carry > 0);
      fs_unf <= (carry < 0);
    end
  end

endmodule
