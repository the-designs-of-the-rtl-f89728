// tb_ccb_heartbeat_gen: the beat must alternate at every clock after reset.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_heartbeat_gen;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, beat, prev;
  always #5 clock = ~clock;
  ccb_heartbeat_gen dut (.clock, .reset, .beat);
  `TB_WATCHDOG(1000)
  initial begin
    @(posedge clock); #1 `CHECK(beat == 0, "reset value")
    repeat (2) @(posedge clock); #1 reset = 0;
    prev = beat;
    repeat (100) begin @(posedge clock); #1 `CHECK(beat == ~prev, "toggle"); prev = beat; end
    `TB_FINISH
  end
endmodule
