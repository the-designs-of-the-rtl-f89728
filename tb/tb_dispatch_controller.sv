// tb_dispatch_controller: a frame is requested at the end of every
// integration, carrying the number, start time and calibration state of the
// integration just finished; in dump mode a frame is also requested at the
// start and carries the integration that begins.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_dispatch_controller;
  import ccb_pkg::*;
  `include "tb/cfg_util.svh"
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, run = 0, start_snd, dump, stable = 1;
  logic [31:0] scan_id = 0;
  logic [1:0] cal = 0, dslave;
  logic [15:0] dsize;
  hdr_info_t info;
  scan_cfg_t cfg;
  int cyc = 0, s0 = -1, nsnd, L, I, np, P, n;
  bit dm, snd_d = 0;
  always #5 clock = ~clock;
  dispatch_controller dut (.clock, .reset, .run, .cfg, .scan_id, .cal, .stable, .start_snd, .info,
                           .dump, .dsize, .dslave);
  always @(negedge clock) begin
    cyc++;
    snd_d <= start_snd;
    if (run && dut.start_tick) s0 = cyc;
    // the frame header takes the information one clock after the request
    if (snd_d) begin
      nsnd++;
      n = (cyc - 1 - s0) / P;                   // integrations completed
      if (!dm) begin
        `CHECK((cyc - 1 - s0) % P == 0 && n >= 1, "frame at an integration boundary")
        `CHECK(info.integ_id == 32'(n - 1), "number of the finished integration")
        `CHECK(info.time_stamp == 32'((n - 1) * P), "start time of the finished integration")
      end else begin
        `CHECK(info.integ_id == 32'(n), "dump frame carries the integration that begins")
      end
      `CHECK(info.scan_id == scan_id && info.cal == cal, "scan id and calibration state")
    end
  end
  `TB_WATCHDOG(200000)
  initial begin
    cfg = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 8; r++) begin
      L = 10 + $urandom % 30; I = 1 + $urandom % 3; dm = (r >= 6);
      cfg = make_cfg(L, I, r[0], r[1], dm, 0, 3);
      np = (r[0] && r[1]) ? 4 : (r[0] || r[1]) ? 2 : 1;
      P = L * np * I;
      nsnd = 0; s0 = -1; scan_id = $urandom; cal = 2'($urandom);
      repeat (3) @(negedge clock);
      run = 1;
      repeat (P * 4 + 4) @(negedge clock);
      `CHECK(nsnd == (dm ? 5 : 4), "frames per run")
      `CHECK(dsize == cfg.dump_lim && dslave == cfg.dump_slave && dump == dm, "dump settings")
      run = 0;
      repeat (10) @(negedge clock);
    end
    `TB_FINISH
  end
endmodule
