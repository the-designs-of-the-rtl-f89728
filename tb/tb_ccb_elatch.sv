// tb_ccb_elatch: random enable/data stimulus against a reference flip-flop.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_elatch;
  int checks = 0, failures = 0;
  logic clock = 0, clear = 1, ien = 0, d = 0, q, q_n, ref_q;
  always #5 clock = ~clock;
  ccb_elatch dut (.clock, .clear, .ien, .d, .q, .q_n);
  `TB_WATCHDOG(2000)
  initial begin
    ref_q = 0;
    repeat (2) @(posedge clock);
    #1 clear = 0;
    repeat (500) begin
      @(negedge clock); ien = $urandom; d = $urandom;
      @(posedge clock); if (ien) ref_q = d;
      #1 `CHECK(q == ref_q && q_n == ~ref_q, "elatch value")
    end
    #1 clear = 1; #1 `CHECK(q == 0, "async clear")
    `TB_FINISH
  end
endmodule
