// Testbench of subpps_offset_meter: a PMU time advancing 25 ns per cycle, a
// subPPS edge pulse every 2000 cycles carrying its nominal time, and sample
// strobes every 800 cycles with a drifting phase. For each edge the offset
// reported must be the time of the first sample at or after the edge minus
// the edge time; a sample in the same cycle as the edge counts as first.
`timescale 1ns/1ps
module tb_subpps_offset_meter;
  import wr_pmu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic subpps_rise = 0, sample_stb = 0;
  pmu_time_t t_subpps, t_pmu, t_frame, t0;
  logic offset_valid;
  logic signed [31:0] offset_ns;
  int checks = 0, failures = 0, n_meas = 0;
  longint now_ns, edge_ns, first_ns, exp_q[$];
  bit waiting;

  subpps_offset_meter dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic pmu_time_t mk(longint t);
    pmu_time_t r;
    r.sec = 32'(t / 1_000_000_000);
    r.ns  = 30'(t % 1_000_000_000);
    return r;
  endfunction

  int c, samp_next;
  initial begin
    now_ns = 64'd12 * 64'd1_000_000_000 + 64'd999_000_000;
    t_subpps = '0; t_pmu = mk(now_ns);
    waiting = 0; samp_next = 400;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (c = 0; c < 60_000; c++) begin
      // values of this cycle; the edge generator reports one cycle late
      t_pmu = mk(now_ns);
      sample_stb = (c == samp_next);
      if (sample_stb) samp_next = c + 800 + (c >= 30_000 ? 7 : 0);
      subpps_rise = (c % 2000 == 1);
      if (subpps_rise) begin
        edge_ns  = now_ns - 25;             // edge was in the previous cycle
        t_subpps = mk(edge_ns);
        waiting  = 1;
      end
      // the meter registers the strobe: a strobe in the edge cycle (c-1) counts
      @(posedge clk); #1;
      now_ns += 25;
    end
    chk(n_meas >= 25, $sformatf("measurements %0d", n_meas));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: remember strobes (time) and edges; first strobe whose time is
  // >= the edge time after the edge was announced
  longint last_edge = -1;
  bit     armed_ref = 0;
  longint stb_hist_t = -1;
  always @(posedge clk) if (rst_n) begin
    if (subpps_rise) begin
      last_edge = longint'(t_subpps.sec) * 1_000_000_000 + longint'(t_subpps.ns);
      armed_ref = 1;
      // a strobe in the cycle of the edge itself (previous cycle) counts
      if (stb_hist_t == last_edge) begin
        exp_q.push_back(0);
        armed_ref = 0;
      end
    end else if (sample_stb && armed_ref) begin
      exp_q.push_back(longint'(t_pmu.sec) * 1_000_000_000 + longint'(t_pmu.ns) - last_edge);
      armed_ref = 0;
    end
    stb_hist_t = sample_stb ? longint'(t_pmu.sec) * 1_000_000_000 + longint'(t_pmu.ns) : -1;
    if (offset_valid) begin
      n_meas++;
      if (exp_q.size() == 0) chk(0, "unexpected measurement");
      else begin
        longint e;
        e = exp_q.pop_front();
        chk(longint'(offset_ns) == e, $sformatf("offset %0d expected %0d", offset_ns, e));
        chk(offset_ns >= 0 && offset_ns < 20_100, "offset within one sample period");
      end
    end
  end

  initial begin
    repeat (70_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
