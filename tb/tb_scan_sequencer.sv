// tb_scan_sequencer: for random state lengths, active switch sets and
// integration lengths, the start tick comes once after load falls, phase ticks
// every state_len clocks, cycle ticks every state_len * nphases clocks (nphases
// 4, 2 or 1 for two, one or no active switches) and integration ticks every
// integ_len cycles, all counted from the start tick; the time stamp counts
// clocks from the start tick.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_scan_sequencer;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 1, active_a = 0, active_b = 0;
  logic [15:0] state_len = 4, integ_len = 2;
  logic phase_tick, cycle_tick, integ_tick, start_tick;
  logic [31:0] time_stamp;
  longint cyc = 0, t0 = -1;
  int nstart = 0, nph = 0, ncy = 0, nin = 0, np;
  always #5 clock = ~clock;
  scan_sequencer dut (.clock, .reset, .load, .state_len, .integ_len, .active_a, .active_b,
                      .phase_tick, .cycle_tick, .integ_tick, .start_tick, .time_stamp);
  always @(posedge clock) begin
    cyc++;
    if (!load) begin
      if (start_tick) begin nstart++; t0 = cyc; end
      if (t0 >= 0) begin
        `CHECK(time_stamp == 32'(cyc - t0), "time stamp counts from the start tick")
        `CHECK(phase_tick == (cyc > t0 && (cyc - t0) % state_len == 0), "phase tick period")
        `CHECK(cycle_tick == (cyc > t0 && (cyc - t0) % (state_len * np) == 0), "cycle tick period")
        `CHECK(integ_tick == (cyc > t0 && (cyc - t0) % (state_len * np * integ_len) == 0), "integration tick period")
        nph += phase_tick; ncy += cycle_tick; nin += integ_tick;
      end
    end
  end
  `TB_WATCHDOG(400000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 12; r++) begin
      @(negedge clock);
      load = 1; t0 = -1; nstart = 0;
      state_len = 16'(2 + $urandom % 40); integ_len = 16'(1 + $urandom % 6);
      {active_b, active_a} = 2'(r % 4);
      np = (active_a && active_b) ? 4 : (active_a || active_b) ? 2 : 1;
      repeat (3) @(negedge clock);
      load = 0;
      @(negedge clock);
      `CHECK(!start_tick, "no start tick one clock after load falls")
      @(negedge clock);
      `CHECK(start_tick, "start tick at the second clock after load falls")
      repeat (state_len * np * integ_len * 3 + 5) @(negedge clock);
      `CHECK(nstart == 1, "one start tick per load")
    end
    `CHECK(nph > 100 && ncy > 20 && nin > 10, "ticks seen")
    `TB_FINISH
  end
endmodule
