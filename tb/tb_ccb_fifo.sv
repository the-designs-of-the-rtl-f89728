// tb_ccb_fifo: random push/pop against a queue model, including full and empty.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_fifo;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, clear = 0, ien = 0, oen = 0, full, empty;
  logic [15:0] d = 0, q;
  logic [15:0] model [$];
  int nfull = 0;
  always #5 clock = ~clock;
  ccb_fifo #(.WID(16), .DEPTH(16)) dut (.clock, .reset, .clear, .ien, .d, .oen, .q, .full, .empty);
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int ph = 0; ph < 3; ph++)
      repeat (1500) begin
        @(negedge clock);
        ien = (ph == 0) ? ($urandom % 4 != 0) : (ph == 1) ? ($urandom % 4 == 0) : $urandom;
        oen = (ph == 0) ? ($urandom % 4 == 0) : (ph == 1) ? ($urandom % 4 != 0) : $urandom;
        d = $urandom;
        `CHECK(empty == (model.size() == 0), "empty flag")
        `CHECK(full == (model.size() == 16), "full flag")
        if (model.size() > 0) `CHECK(q == model[0], "head word")
        if (full) nfull++;
        @(posedge clock);
        if (oen && model.size() > 0) void'(model.pop_front());
        if (ien && model.size() < 16 && !full) model.push_back(d);
      end
    `CHECK(nfull > 0, "full reached")
    @(negedge clock); clear = 1; ien = 0; oen = 0;
    @(negedge clock); clear = 0;
    `CHECK(empty, "clear empties")
    `TB_FINISH
  end
endmodule
