// tb_pps_gateway: each rising edge of the 1PPS input, of any width, gives one
// one-clock pulse two clocks later.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_pps_gateway;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, pps = 0, sec;
  int n;
  always #5 clock = ~clock;
  pps_gateway dut (.clock, .reset, .pps, .sec);
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (50) begin
      @(negedge clock); pps = 1;
      @(negedge clock); `CHECK(!sec, "not after one clock")
      @(negedge clock); `CHECK(sec, "pulse after two clocks")
      n = 1;
      repeat (1 + $urandom % 60) begin
        // the line stays high: width does not matter
        @(negedge clock); n += sec;
      end
      pps = 0;
      repeat (3) begin @(negedge clock); n += sec; end
      `CHECK(n == 1, "one pulse per rising edge")
    end
    `TB_FINISH
  end
endmodule
