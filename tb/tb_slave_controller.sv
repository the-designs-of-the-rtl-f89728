// tb_slave_controller: the phase lines sent to the slaves walk the switch
// sequence one state every state_len clocks from the start tick; blanking
// covers blank_dt clocks of every state; start_acq comes at the start and at
// every integration boundary; in dump mode the phase lines carry the sampler
// to dump instead.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_slave_controller;
  import ccb_pkg::*;
  `include "tb/cfg_util.svh"
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, run = 0, blank, dump, test, start_acq;
  logic [1:0] phase;
  scan_cfg_t cfg;
  int cyc = 0, s0 = -1, nblank, nacq, nticks, L, I, np, k;
  bit sa, sb, dm;
  always #5 clock = ~clock;
  slave_controller dut (.clock, .reset, .run, .cfg, .blank, .phase, .dump, .test, .start_acq);
  always @(negedge clock) begin
    cyc++;
    if (run) begin
      if (dut.start_tick) s0 = cyc;
      if (s0 >= 0 && cyc > s0) begin
        k = (cyc - s0 - 1) / L;
        if (!dm) `CHECK(phase == gray_state(k, sa, sb), "phase lines follow the switch sequence")
        else     `CHECK(phase == cfg.dump_sampler, "dump sampler on the phase lines")
      end
      nblank += blank; nacq += start_acq;
    end
  end
  `TB_WATCHDOG(200000)
  initial begin
    cfg = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 10; r++) begin
      L = 40 + $urandom % 30; I = 1 + $urandom % 4;
      {sb, sa} = 2'(r % 4); dm = (r >= 8);
      np = (sa && sb) ? 4 : (sa || sb) ? 2 : 1;
      cfg = make_cfg(L, I, sa, sb, dm, r[0], 5 + r);
      nblank = 0; nacq = 0; s0 = -1;
      repeat (3) @(negedge clock);  // the controller loads the configuration while held
      run = 1;
      repeat (L * np * I * 3 + 2 + 25) @(negedge clock);  // three integrations after the start tick
      `CHECK(dump == dm && test == r[0], "mode flags")
      `CHECK(nacq == 4, "start_acq at the start and at three integration boundaries")
      nticks = 1 + 3 * np * I;
      `CHECK(nblank == ((sa || sb) ? nticks * (5 + r) : 0), "blanking clocks")
      run = 0;
      repeat (60) @(negedge clock);
    end
    `TB_FINISH
  end
endmodule
