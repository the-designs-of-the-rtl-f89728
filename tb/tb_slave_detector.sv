// tb_slave_detector: four boards, some with a toggling heartbeat and some
// stuck; after a read of every board the roster shows which are alive.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_slave_detector;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, read = 0, hb;
  logic [1:0] slave = 0;
  logic [3:0] roster, present, beat = 0;
  always #5 clock = ~clock;
  slave_detector dut (.clock, .reset, .slave, .read, .hb, .roster);
  assign hb = beat[slave];
  always @(posedge clock) beat <= (beat ^ present);
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 30; r++) begin
      present = 4'($urandom);
      for (int k = 0; k < 3; k++)
        for (int s = 3; s >= 0; s--) begin
          @(negedge clock); read = 1; slave = 2'(s);
          repeat (2 + $urandom % 3) @(negedge clock);  // at least two reads in a row
          read = 0;
          @(negedge clock);
        end
      `CHECK(roster == present, "roster of live boards")
    end
    `TB_FINISH
  end
endmodule
