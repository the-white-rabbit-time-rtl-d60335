// Testbench of wr_time_retriever: a simple node model answers each trigger
// after a variable latency with the time it captured at the trigger; one
// trigger is left unanswered. Checks the 20 us trigger period, the state
// order normal -> trigger -> freeze, the value read, and the miss counter.
`timescale 1ns/1ps
module tb_wr_time_retriever;
  import wr_pmu_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  logic wr_normal, wr_trig, wr_freeze, wr_node_ready;
  pmu_time_t wr_time, utc_wr;
  logic utc_wr_valid;
  logic [15:0] miss_count;
  int checks = 0, failures = 0;
  int cyc = 0;

  wr_time_retriever dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // node model
  int lat, lat_cnt, n_trig = 0, last_trig_cyc = -1, n_valid = 0;
  bit trig_q = 0, answering = 0, normal_seen = 0;
  pmu_time_t captured;
  always @(posedge clk) if (rst_n) begin
    trig_q <= wr_trig;
    if (wr_trig && !trig_q) begin
      n_trig++;
      chk(normal_seen, "node put in normal operation before the trigger");
      if (last_trig_cyc >= 0) chk(cyc - last_trig_cyc == 800, $sformatf("trigger period %0d", cyc - last_trig_cyc));
      last_trig_cyc = cyc;
      captured.sec <= 32'(1000 + n_trig);
      captured.ns  <= 30'(n_trig * 12345);
      lat       = 2 + (n_trig * 7) % 40;
      lat_cnt   <= 0;
      answering <= (n_trig != 5);
    end else if (wr_trig && answering) begin
      lat_cnt <= lat_cnt + 1;
    end
    normal_seen <= wr_normal && !wr_trig ? 1'b1 : (wr_normal ? normal_seen : 1'b0);
    if (utc_wr_valid) begin
      n_valid++;
      chk(utc_wr == captured, "time read equals time captured at trigger");
    end
  end
  assign wr_node_ready = wr_trig && answering && (lat_cnt >= lat);
  assign wr_time = wr_freeze ? captured : '0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; enable = 1;
    repeat (800 * 12 + 10) @(posedge clk);
    enable = 0;
    repeat (2000) @(posedge clk);
    chk(n_trig >= 12, $sformatf("triggers %0d", n_trig));
    chk(n_valid == n_trig - 1, $sformatf("readings %0d of %0d triggers", n_valid, n_trig));
    chk(miss_count == 1, $sformatf("miss count %0d", miss_count));
    chk(!wr_trig && !wr_normal, "disabled: no trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
