// Phase compensation for the subPPS-to-sample offset.
//
// The estimator returns the phase of the first sample of the window, taken at
// t0 rather than at the subPPS time t_subPPS. As in the original design, the
// phase at t_subPPS is
//   phi_c = phi_0 + 2*pi * f_c * (t0 - t_subPPS)
// This sign fits an estimator whose reported phase falls with time; one that
// reports the phase of A*cos(2*pi*f*t + phi) at t0 needs the opposite sign
// and can negate its phase before and after this block.
// Phases are unsigned Q32 fractions of a turn (2^32 = 2*pi rad), so the sum
// wraps modulo 2*pi by itself; f_c is in uHz and the offset in ns, and
//   2*pi*f_c*dt [turns * 2^32] = f_uHz * dt_ns * 2^32 / 10^15
// is formed with the constant K = round(2^92 / 10^15) and a 60-bit shift
// (relative error about 1e-13), rounded to the nearest LSB. The number formats
// are this design's choice. Latency: one cycle.
module phase_compensator (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [31:0]        phi0_q32,
  input  logic [31:0]        fc_uhz,
  input  logic signed [31:0] offset_ns,
  output logic               out_valid,
  output logic [31:0]        phic_q32
);

  localparam logic signed [63:0] K = 64'sd4_951_760_157_142;  // round(2^92 / 1e15)

  logic signed [63:0]  f_dt;
  logic signed [127:0] turns;
  logic signed [31:0]  corr;

  always_comb begin
    f_dt  = $signed({32'd0, fc_uhz}) * 64'(offset_ns);
    turns = 128'(f_dt) * 128'(K);
    turns = (turns + (128'sd1 <<< 59)) >>> 60;
    corr  = turns[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phic_q32  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) phic_q32 <= phi0_q32 + corr[31:0];
    end
  end

endmodule
