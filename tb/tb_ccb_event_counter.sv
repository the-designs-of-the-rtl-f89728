// tb_ccb_event_counter: random sload/up/down against a reference model.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_event_counter;
  int checks = 0, failures = 0;
  logic clock = 0, clear = 1, sload = 0, up = 0, down = 0;
  logic [15:0] d = 0, count, ref_c;
  always #5 clock = ~clock;
  ccb_event_counter #(.WID(16)) dut (.clock, .clear, .sload, .up, .down, .d, .count);
  `TB_WATCHDOG(5000)
  initial begin
    ref_c = 0;
    repeat (2) @(posedge clock);
    #1 clear = 0;
    repeat (2000) begin
      @(negedge clock);
      sload = ($urandom % 8) == 0; up = $urandom; down = $urandom; d = $urandom;
      if ($urandom % 16 == 0) d = 16'hFFFF;
      @(posedge clock);
      if (sload) ref_c = d; else if (up && !down) ref_c++; else if (down && !up) ref_c--;
      #1 `CHECK(count == ref_c, "counter value")
    end
    `TB_FINISH
  end
endmodule
