// Frequency compensation for the sampling-clock drift.
//
// With a drifting sampling clock the true DFT bin spacing is not 1/T but
//   df_c = df * (1 - f_D),   df = 1/T (T = 60 ms window: df = 16.666667 Hz)
// and a frequency estimate expressed in bins, f = (k + delta) * df, is
// corrected the same way: f_c = f * (1 - f_D). The block keeps df_c up to date
// whenever a new drift f_D arrives (fd_valid) and corrects each incoming
// frequency estimate (f_valid) with the latest drift.
// Frequencies are unsigned micro-hertz, f_D a signed Q40 fraction. Applying
// the correction to the finished estimate rather than inside the estimator,
// and the number formats, are this design's choices. Latency: one cycle.
module freq_compensator #(
  parameter int unsigned WINDOW_US = 60_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fd_valid,
  input  logic signed [47:0] fd_q40,
  input  logic               f_valid,
  input  logic [31:0]        f_uhz,
  output logic [31:0]        df_c_uhz,
  output logic               fc_valid,
  output logic [31:0]        fc_uhz
);

  // 1/T in uHz, rounded
  localparam longint DF_UHZ = (64'd1_000_000_000_000 + 64'(WINDOW_US / 2)) / 64'(WINDOW_US);

  logic signed [47:0] fd_cur;

  // x * (1 - fd), rounded to the nearest uHz
  function automatic logic [31:0] scale(logic [31:0] x, logic signed [47:0] fd);
    logic signed [95:0] prod;
    prod = $signed({64'd0, x}) * 96'(fd);
    prod = (prod + (96'sd1 <<< 39)) >>> 40;
    return x - prod[31:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd_cur   <= '0;
      df_c_uhz <= DF_UHZ[31:0];
      fc_valid <= 1'b0;
      fc_uhz   <= '0;
    end else begin
      fc_valid <= f_valid;
      if (fd_valid) begin
        fd_cur   <= fd_q40;
        df_c_uhz <= scale(DF_UHZ[31:0], fd_q40);
      end
      if (f_valid) fc_uhz <= scale(f_uhz, fd_valid ? fd_q40 : fd_cur);
    end
  end

endmodule
