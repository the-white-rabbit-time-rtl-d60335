// Testbench of free_running_clock: the reference is the total time in
// femtoseconds, advanced by 25 ns + gamma per tick. Random corrections of
// both signs (including the +-999999 fs extremes) are applied across a second
// rollover; the clock is compared every cycle, overflow/underflow flags are
// counted, and a load is checked.
`timescale 1ns/1ps
module tb_free_running_clock;
  import wr_pmu_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  pmu_time_t load_time, t_pmu;
  logic signed [31:0] gamma_fs = 0;
  logic [19:0] fs_cnt;
  logic fs_ovf, fs_unf;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;
  longint tot;   // femtoseconds since 0; fits 9200 s

  free_running_clock dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic tick_check(input string tag);
    @(posedge clk); #1;
    tot += 25_000_000 + longint'(gamma_fs);
    chk(t_pmu.sec == 32'(tot / 64'd1_000_000_000_000_000) &&
        t_pmu.ns  == 30'((tot / 1_000_000) % 1_000_000_000) &&
        fs_cnt    == 20'(tot % 1_000_000), tag);
    if (fs_ovf) n_ovf++;
    if (fs_unf) n_unf++;
  endtask

  initial begin
    load_time = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // load 5 us before a second rollover
    load_time.sec = 32'd5000; load_time.ns = 30'd999_995_000; load = 1;
    tot = 64'd5000 * 64'd1_000_000_000_000_000 + 64'd999_995_000 * 64'd1_000_000;
    tick_check("load");
    load = 0;
    for (int i = 0; i < 2000; i++) begin
      case (i % 4)
        0: gamma_fs = 999_999;
        1: gamma_fs = -999_999;
        default: gamma_fs = int'($urandom_range(0, 400_000)) - 200_000;
      endcase
      if (i >= 1000) gamma_fs = (i < 1500) ? 60_000 : -60_000;
      tick_check($sformatf("tick %0d gamma %0d", i, gamma_fs));
    end
    chk(n_ovf > 10 && n_unf > 10, $sformatf("overflows %0d underflows %0d", n_ovf, n_unf));
    gamma_fs = 0;
    for (int i = 0; i < 10; i++) tick_check("no correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
