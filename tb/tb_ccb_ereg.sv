// tb_ccb_ereg: random enable/data stimulus against a reference register.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_ereg;
  int checks = 0, failures = 0;
  logic clock = 0, clear = 1, ien = 0;
  logic [7:0] d = 0, q, ref_q;
  always #5 clock = ~clock;
  ccb_ereg #(.WID(8)) dut (.clock, .clear, .ien, .d, .q);
  `TB_WATCHDOG(2000)
  initial begin
    ref_q = 0;
    repeat (2) @(posedge clock);
    #1 clear = 0;
    repeat (500) begin
      @(negedge clock); ien = $urandom; d = $urandom;
      @(posedge clock); if (ien) ref_q = d;
      #1 `CHECK(q == ref_q, "ereg value")
    end
    `TB_FINISH
  end
endmodule
