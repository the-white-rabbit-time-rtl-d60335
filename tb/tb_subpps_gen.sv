// Testbench of subpps_gen: drives the PMU time with 10007 ns steps over two
// seconds and checks one rising edge per 20 ms boundary crossed (50 per
// second, the first at the second rollover), the edge time and frame index,
// and the 50 % duty cycle of the square wave.
`timescale 1ns/1ps
module tb_subpps_gen;
  import wr_pmu_pkg::*;
  logic clk = 0, rst_n = 0;
  pmu_time_t t_pmu, t_subpps;
  logic subpps, subpps_rise;
  logic [15:0] frame_idx;
  int checks = 0, failures = 0, n_rise = 0, n_exp = 0, n_high = 0, n_tot = 0;
  longint tot, prev, bnd;

  subpps_gen dut (.*);

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

  initial begin
    tot = 64'd77 * 64'd1_000_000_000 + 64'd10_000_000;   // starts in the low half of a period
    t_pmu = mk(tot);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 200_000; i++) begin
      prev = tot;
      tot += 10007;
      t_pmu = mk(tot);
      @(posedge clk); #1;
      // outputs now describe t_pmu of this cycle
      bnd = (tot / 20_000_000) * 20_000_000;
      if (bnd > prev) begin
        n_exp++;
        chk(subpps_rise, $sformatf("edge expected at %0d", tot));
        chk(t_subpps == mk(bnd), "edge time");
        chk(frame_idx == 16'((bnd % 1_000_000_000) / 20_000_000), "frame index");
      end else begin
        chk(!subpps_rise, "no edge expected");
      end
      if (subpps_rise) n_rise++;
      chk(subpps == ((tot % 20_000_000) < 10_000_000), "square wave level");
      n_tot++;
      if (subpps) n_high++;
    end
    chk(n_rise == 100 && n_exp == 100, $sformatf("edges %0d expected %0d", n_rise, n_exp));
    chk(n_high * 100 / n_tot inside {[49:51]}, "duty cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
