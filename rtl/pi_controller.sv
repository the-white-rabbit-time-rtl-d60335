// PI controller of the internal clock.
//
// On each new error eps(n) (ns) it computes the per-tick correction
//   gamma(n) = Kp * eps(n) + sum_{k<=n} sign(eps(k))        [fs per tick]
// and holds it until the next error. The integrator is a counter stepped by
// +-1 fs with the sign of the error, as in the design. Kp is chosen so that an
// error is worked off over PI_AVG_NS (10 ms in the design): with 25 ns ticks a
// 1 ns error becomes 10^6 fs / 400000 ticks = 2.5 fs per tick. Kp is held as a
// Q8 fixed-point number (KP_Q8 = 640). gamma is clamped to +-GAMMA_MAX_FS so
// that the femtosecond counter carries at most one ns per tick; the clamp, the
// Q8 format and the integrator width are this design's choices.
// clear (on a clock overwrite) empties the integrator and sets gamma to zero.
// Latency: gamma is updated one cycle after err_valid.
module pi_controller #(
  parameter int unsigned TICK_NS      = 25,
  parameter int unsigned PI_AVG_NS    = 10_000_000,
  parameter int          KP_Q8        = int'((64'd256_000_000 * 64'(TICK_NS)) / 64'(PI_AVG_NS)),
  parameter int          GAMMA_MAX_FS = 999_999
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               err_valid,
  input  logic signed [31:0] err_ns,
  output logic signed [31:0] gamma_fs,
  output logic signed [31:0] integ_fs
);

  logic signed [63:0] p_term;
  logic signed [31:0] integ_next;
  logic signed [63:0] sum;

  always_comb begin
    p_term = (64'(err_ns) * 64'(KP_Q8)) >>> 8;
    if (err_ns > 0)      integ_next = integ_fs + 32'sd1;
    else if (err_ns < 0) integ_next = integ_fs - 32'sd1;
    else                 integ_next = integ_fs;
    if (integ_next > GAMMA_MAX_FS)       integ_next = GAMMA_MAX_FS;
    else if (integ_next < -GAMMA_MAX_FS) integ_next = -GAMMA_MAX_FS;
    sum = p_term + 64'(integ_next);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gamma_fs <= '0;
      integ_fs <= '0;
    end else if (clear) begin
      gamma_fs <= '0;
      integ_fs <= '0;
    end else if (err_valid) begin
      integ_fs <= integ_next;
      if (sum > 64'(GAMMA_MAX_FS))       gamma_fs <= GAMMA_MAX_FS;
      else if (sum < -64'(GAMMA_MAX_FS)) gamma_fs <= -GAMMA_MAX_FS;
      else                               gamma_fs <= sum[31:0];
    end
  end

endmodule
