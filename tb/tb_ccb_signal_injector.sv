// tb_ccb_signal_injector: period 2^14-1, every non-zero value once, restart on start.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_signal_injector;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0;
  logic [13:0] q, first [8];
  bit seen [16384];
  int n, dup;
  always #5 clock = ~clock;
  ccb_signal_injector dut (.clock, .reset, .start, .q);
  `TB_WATCHDOG(40000)
  initial begin
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0; start = 1;
    @(negedge clock); start = 0;
    `CHECK(q == 14'h3FFF, "start sets all ones")
    dup = 0;
    for (n = 0; n < 16383; n++) begin
      if (n < 8) first[n] = q;
      if (seen[q]) dup++;
      seen[q] = 1;
      `CHECK(q != 0, "never zero")
      @(negedge clock);
    end
    `CHECK(dup == 0, "each value once per period")
    `CHECK(q == 14'h3FFF, "period 16383")
    // taps 13, 4, 2, 0 of all ones give a feedback of 0, then 1
    `CHECK(first[1] == 14'h3FFE, "second value")
    `CHECK(first[2] == 14'h3FFD, "third value")
    repeat (37) @(negedge clock);
    start = 1; @(negedge clock); start = 0;
    for (int i = 0; i < 8; i++) begin `CHECK(q == first[i], "repeatable after start"); @(negedge clock); end
    `TB_FINISH
  end
endmodule
