// tb_ccb_accumulator: random samples and integration periods; checks the two
// words read out after each start against an independent sum, including
// saturation by overflow and by carry.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_accumulator;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0, select = 0, blank = 0, overflow = 0, shift = 0;
  logic [13:0] sample = 0;
  logic [15:0] sin = 16'hABCD, sout;
  longint total;
  logic [31:0] expect_v;
  int nsat = 0;
  always #5 clock = ~clock;
  ccb_accumulator dut (.clock, .reset, .start, .select, .blank, .sample, .overflow, .shift, .sin, .sout);
  `TB_WATCHDOG(400000)
  task automatic drive(input bit st, input int mode);
    @(negedge clock);
    start = st; select = (mode == 2) ? 1'b1 : 1'($urandom); blank = (mode != 2) && (($urandom % 5) == 0);
    sample = (mode == 2) ? 14'h3FFF : 14'($urandom);
    overflow = (mode == 1) && (($urandom % 50) == 0);
    @(posedge clock);
    if (st) total = 0;
    if (select && !blank) total += sample;
    if (select && overflow) total = 64'hFFFF_FFFF;
    if (total > 64'hFFFF_FFFF) total = 64'hFFFF_FFFF;
  endtask
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    total = 0;
    drive(1, 0);
    for (int p = 0; p < 12; p++) begin
      int len = (p == 5) ? 290000 : 50 + $urandom % 200;
      for (int i = 0; i < len; i++) drive(0, (p == 5) ? 2 : (p % 3 == 1) ? 1 : 0);
      expect_v = total[31:0];
      if (expect_v == 32'hFFFF_FFFF) nsat++;
      drive(1, 0);
      @(negedge clock); start = 0; select = 0;
      `CHECK(sout == expect_v[15:0], "low half two clocks after start")
      shift = 1; @(negedge clock);
      `CHECK(sout == expect_v[31:16], "high half after one shift")
      @(negedge clock); shift = 0;
      `CHECK(sout == sin, "chain input after two shifts")
      total = 0;
      drive(1, 0);
    end
    `CHECK(nsat >= 2, "saturation exercised")
    `TB_FINISH
  end
endmodule
