// Behavioural model (not synthesizable) of the White Rabbit node that serves
// UTC time to the PMU FPGA, operated as a WR slave.
//
// The node keeps its own UTC time (seconds + femtoseconds); per FPGA tick it
// advances by 25 ns plus drift_fs, which models the frequency offset between
// the free-running FPGA oscillator and WR time. On the rising edge of wr_trig
// it captures its time, adds a uniform random jitter of up to +-JITTER_PS picoseconds and
// truncates to whole ns; LAT_CYC cycles later it raises wr_node_ready until
// the trigger falls. wr_time shows the captured time. mute suppresses the
// answer to the triggers it covers; jump_ns, applied for one cycle, steps the
// UTC time. utc_now gives the true UTC time of the current cycle.
`timescale 1ns/1ps
module wr_node_model
  import wr_pmu_pkg::*;
#(
  parameter int LAT_CYC   = 117,
  parameter int JITTER_PS = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_trig,
  input  logic      wr_freeze,
  output logic      wr_node_ready,
  output pmu_time_t wr_time,
  input  int        drift_fs,
  input  bit        mute,
  input  int        jump_ns,
  output pmu_time_t utc_now,
  output longint    utc_fs_in_sec
);
  localparam longint FS_SEC = 64'd1_000_000_000_000_000;
  longint sec = 1_700_000_000, fs = 64'd999_000_000_000_000 - 64'd123_456_789;
  bit     trig_q = 0, answer = 0;
  int     cnt = 0;
  pmu_time_t cap = '0;
  longint c_fs;

  assign utc_now.sec   = 32'(sec);
  assign utc_now.ns    = 30'(fs / 1_000_000);
  assign utc_fs_in_sec = fs;

  always @(posedge clk) begin
    trig_q <= wr_trig;
    if (wr_trig && !trig_q) begin
      c_fs = fs + (JITTER_PS == 0 ? 0 :
                   (longint'($urandom_range(0, 2 * JITTER_PS)) - longint'(JITTER_PS)) * 1000);
      cap.sec <= 32'(sec + (c_fs >= FS_SEC ? 1 : 0) - (c_fs < 0 ? 1 : 0));
      cap.ns  <= 30'(((c_fs % FS_SEC) + FS_SEC) % FS_SEC / 1_000_000);
      cnt     <= 0;
      answer  <= !mute;
    end else if (wr_trig) begin
      cnt <= cnt + 1;
    end
    // advance UTC
    fs = fs + 25_000_000 + longint'(drift_fs) + longint'(jump_ns) * 1_000_000;
    if (fs >= FS_SEC) begin fs -= FS_SEC; sec++; end
  end

  assign wr_node_ready = wr_trig && answer && (cnt >= LAT_CYC - 1);
  assign wr_time       = cap;

  // the node is read only after it answered
  a_freeze_after_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                          wr_freeze |-> $past(wr_node_ready));
endmodule
