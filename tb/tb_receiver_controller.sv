// tb_receiver_controller: the switch drive lines follow the switch sequence
// with the closed levels applied; calibration entries queued while the scan
// is held are applied from the start tick, one integration each; an
// integration interrupt comes at every integration boundary.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_receiver_controller;
  import ccb_pkg::*;
  `include "tb/cfg_util.svh"
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, run = 0, cal_attn = 0, stable, cal_intr, int_intr;
  logic [7:0] cal_reg = 0;
  logic [1:0] phs, cal, entries [4];
  scan_cfg_t cfg;
  int cyc = 0, s0 = -1, nint, ncal, L, I, np, k, integ;
  bit sa, sb, ca, cb;
  always #5 clock = ~clock;
  receiver_controller dut (.clock, .reset, .run, .cfg, .cal_reg, .cal_attn, .phs, .cal, .stable,
                           .cal_intr, .int_intr);
  always @(negedge clock) begin
    cyc++;
    ncal += cal_intr;
    if (run) begin
      if (dut.start_tick) s0 = cyc;
      if (s0 >= 0 && cyc > s0) begin
        k = (cyc - s0 - 1) / L;
        integ = (cyc - s0 - 1) / (L * np * I);
        `CHECK(phs == (gray_state(k, sa, sb) ^ {cb, ca}), "switch drive lines")
        `CHECK(cal == entries[integ > 3 ? 3 : integ], "calibration entry of the integration")
      end
      nint += int_intr;
    end
  end
  `TB_WATCHDOG(200000)
  initial begin
    cfg = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 8; r++) begin
      L = 20 + $urandom % 30; I = 1 + $urandom % 3;
      {cb, ca, sb, sa} = 4'($urandom);
      np = (sa && sb) ? 4 : (sa || sb) ? 2 : 1;
      cfg = make_cfg(L, I, sa, sb, 0, 0, 3);
      cfg.flags.close_a = ca; cfg.flags.close_b = cb;
      nint = 0; s0 = -1;
      repeat (6) @(negedge clock);
      ncal = 0;
      for (int e = 0; e < 4; e++) begin
        entries[e] = 2'($urandom);
        @(negedge clock); cal_reg = {6'd1, entries[e]}; cal_attn = 1; @(negedge clock); cal_attn = 0;
      end
      repeat (3) @(negedge clock);
      `CHECK(ncal == 4, "a calibration request after each entry while the queue has room")
      run = 1;
      repeat (L * np * I * 3 + 4) @(negedge clock);
      `CHECK(nint == 3, "an integration interrupt per integration")
      run = 0;
      repeat (10) @(negedge clock);
    end
    `TB_FINISH
  end
endmodule
