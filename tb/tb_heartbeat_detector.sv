// tb_heartbeat_detector: a heartbeat that changes between two selected reads
// marks the slave alive; a stuck line marks it dead.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_heartbeat_detector;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, select = 0, hb = 0, alive, h1 = 0, h2 = 0;
  always #5 clock = ~clock;
  heartbeat_detector dut (.clock, .reset, .select, .hb, .alive);
  `TB_WATCHDOG(10000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (2000) begin
      @(negedge clock);
      select = $urandom; hb = ($urandom % 4 == 0) ? 1'b0 : ~hb;  // mostly toggling
      if ($urandom % 8 == 0) hb = 1'b1;                         // sometimes stuck
      @(posedge clock); if (select) begin h2 = h1; h1 = hb; end
      #1 `CHECK(alive == (h1 != h2), "alive when the last two samples differ")
    end
    `TB_FINISH
  end
endmodule
