// tb_scan_initiator: a start snapshots the configuration and counts the scan
// id; the receivers run once the preparation delay has passed and the data
// path is idle, on the next 1PPS edge when synchronised; acquisition follows
// roundtrip clocks later. Nothing runs after reset until a start.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_scan_initiator;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0, sync = 0, pps = 0, idle = 1, run_rx, run_acq;
  logic [7:0] regs [NREGS];
  scan_cfg_t scan_regs;
  logic [31:0] scan_id;
  bit direct;
  int t_start, t_rx, t_acq, cyc = 0;
  always #5 clock = ~clock;
  logic rx_d = 0, acq_d = 0;
  always @(posedge clock) cyc++;
  always @(negedge clock) begin
    rx_d <= run_rx; acq_d <= run_acq;
    if (run_rx && !rx_d) t_rx = cyc;
    if (run_acq && !acq_d) t_acq = cyc;
  end
  scan_initiator #(.PREP_DELAY(4)) dut (.clock, .reset, .start, .sync, .config_regs(regs), .pps,
    .idle, .run_rx, .run_acq, .scan_regs, .scan_id);
  `TB_WATCHDOG(50000)
  initial begin
    foreach (regs[i]) regs[i] = 8'($urandom);
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (50) @(negedge clock);
    `CHECK(!run_rx && !run_acq, "no run after reset")
    `CHECK(scan_id == 0, "scan id starts at zero")
    for (int s = 1; s <= 12; s++) begin
      logic [7:0] snap [NREGS];
      foreach (regs[i]) regs[i] = 8'($urandom);
      regs[A_ROUNDTRIP] = 8'($urandom % 30);
      snap = regs;
      sync = (s % 3 == 0); idle = (s % 4 != 1); direct = !sync && idle;
      @(negedge clock); start = 1; t_start = cyc; @(negedge clock); start = 0;
      `CHECK(!run_rx, "receivers held at the start")
      foreach (regs[i]) regs[i] = 8'($urandom);  // later writes do not reach the scan
      `CHECK(scan_id == 32'(s), "scan id counts starts")
      `CHECK(scan_regs.state_len == {snap[A_STATE_LEN], snap[A_STATE_LEN+1]}, "state length, MSB first")
      `CHECK(scan_regs.diode_rise == {snap[6], snap[7], snap[8], snap[9]}, "diode rise time")
      `CHECK(scan_regs.flags == snap[A_SCAN_FLAGS], "flags")
      `CHECK(scan_regs.dump_lim == {snap[A_DUMP_LIM], snap[A_DUMP_LIM+1]}, "dump limit")
      repeat (20) @(negedge clock);
      if (!idle) begin `CHECK(!run_rx, "waits for the data path"); idle = 1; end
      if (sync) begin
        repeat (20) @(negedge clock);
        `CHECK(!run_rx, "waits for 1PPS");
        pps = 1; @(negedge clock); pps = 0;
      end
      while (!run_rx) @(negedge clock);
      `CHECK(!direct || (t_rx - t_start) == 6, "receivers run after the preparation delay")
      while (!run_acq) @(negedge clock);
      @(negedge clock);
      `CHECK(t_acq - t_rx == snap[A_ROUNDTRIP], "acquisition follows after the roundtrip time")
      repeat (30) @(negedge clock);
      `CHECK(run_rx && run_acq, "scan keeps running")
    end
    `TB_FINISH
  end
endmodule
