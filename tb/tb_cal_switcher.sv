// tb_cal_switcher: a diode switched on reports stable rise_dt + 1 clocks after
// the load (update every clock), one switched off after fall_dt + 1 clocks;
// a load that changes nothing keeps it stable; updates that are further apart
// report the settled state only at an update.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_cal_switcher;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 0, update = 1, pending = 0, actual, stable;
  logic [31:0] rise_dt = 0;
  logic [15:0] fall_dt = 0;
  int n;
  always #5 clock = ~clock;
  cal_switcher dut (.clock, .reset, .load, .update, .pending, .rise_dt, .fall_dt, .actual, .stable);
  `TB_WATCHDOG(300000)
  task automatic switch_to(input bit p, input int expect_n);
    @(negedge clock); pending = p; load = 1;
    @(negedge clock); load = 0;
    `CHECK(actual == p, "actual follows pending at load")
    n = 1;  // clocks since the load edge, plus one
    while (!stable && n < 100000) begin @(negedge clock); n++; end
    `CHECK(n == expect_n, "settling time")
  endtask
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (2) @(negedge clock);
    `CHECK(stable, "stable when nothing switched")
    for (int r = 0; r < 30; r++) begin
      rise_dt = 32'(1 + $urandom % 3000); fall_dt = 16'(1 + $urandom % 500);
      switch_to(1, rise_dt + 2);
      switch_to(1, 1);
      `CHECK(stable, "no change keeps stable")
      switch_to(0, fall_dt + 2);
    end
    // sparse updates: stable only changes at an update
    update = 0; rise_dt = 20;
    @(negedge clock); pending = 1; load = 1; update = 1; @(negedge clock); load = 0; update = 0;
    `CHECK(!stable, "unstable after switching on")
    repeat (40) @(negedge clock);
    `CHECK(!stable, "no update, still reported unstable")
    update = 1; @(negedge clock); update = 0;
    `CHECK(stable, "settled at the next update")
    `TB_FINISH
  end
endmodule
