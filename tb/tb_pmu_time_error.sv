// Testbench of pmu_time_error: feeds UTC-WR readings and PMU times and checks
// the first-reading overwrite (with delay and one-tick compensation), the
// error of later readings (including across a second boundary), that a
// repeated reading is ignored, and that a large error overwrites again.
`timescale 1ns/1ps
module tb_pmu_time_error;
  import wr_pmu_pkg::*;
  logic clk = 0, rst_n = 0;
  pmu_time_t utc_wr, t_pmu, load_time;
  logic utc_wr_valid = 0;
  logic err_valid, load, locked;
  logic signed [31:0] err_ns;
  int checks = 0, failures = 0;

  pmu_time_error dut (.*);   // defaults: TICK 25 ns, delay 3000 ns, step 1000 ns

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // total nanoseconds -> time
  function automatic pmu_time_t mk(longint tot);
    pmu_time_t r;
    r.sec = 32'(tot / 1_000_000_000);
    r.ns  = 30'(tot % 1_000_000_000);
    return r;
  endfunction

  task automatic apply(input longint wr_tot, input longint pmu_tot,
                       input bit exp_load, input bit exp_err, input string tag);
    utc_wr = mk(wr_tot); t_pmu = mk(pmu_tot); utc_wr_valid = 1;
    @(posedge clk); #1;
    utc_wr_valid = 0;
    chk(load == exp_load, {tag, ": load"});
    chk(err_valid == exp_err, {tag, ": err_valid"});
    if (exp_load) chk(load_time == mk(wr_tot + 3000 + 25), {tag, ": load time"});
    if (exp_err)  chk(longint'(err_ns) == wr_tot + 3000 - pmu_tot,
                      $sformatf("%s: err %0d expected %0d", tag, err_ns, wr_tot + 3000 - pmu_tot));
    @(posedge clk); #1;
    chk(!load && !err_valid, {tag, ": single-cycle outputs"});
  endtask

  longint base = 64'd1_700_000_000 * 64'd1_000_000_000 + 64'd999_990_000;
  int e;

  initial begin
    utc_wr = '0; t_pmu = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(!locked, "not locked after reset");
    apply(base, base + 777, 1, 0, "first reading");
    chk(locked, "locked after first reading");
    apply(base, base + 20, 0, 0, "repeated reading");
    // errors crossing the second boundary
    for (int i = 1; i <= 40; i++) begin
      e = int'($urandom_range(0, 1998)) - 999;
      apply(base + i * 20000, base + i * 20000 + 3000 - e, 0, 1, $sformatf("reading %0d", i));
    end
    apply(base + 900000, base + 900000 + 3000 - 1000, 0, 1, "error at threshold");
    apply(base + 920000, base + 920000 + 3000 + 1001, 1, 0, "large negative error");
    apply(base + 940000, base + 940000 + 3000 - 50000, 1, 0, "large positive error");
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
