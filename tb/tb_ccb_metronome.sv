// tb_ccb_metronome: tick period with a continuous step and with sparse steps.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_metronome;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 1, step = 0, tick;
  logic [15:0] nstep = 7;
  int cyc, last, nsteps, nticks;
  always #5 clock = ~clock;
  always @(posedge clock) cyc++;
  ccb_metronome #(.WID(16)) dut (.clock, .reset, .load, .nstep, .step, .tick);
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    // continuous step: a tick every nstep clocks
    step = 1;
    repeat (3) @(posedge clock);
    #1 load = 0;
    last = -1; nticks = 0;
    repeat (100) begin
      @(posedge clock);
      if (tick) begin
        if (last >= 0) `CHECK(cyc - last == 7, "period with continuous step")
        last = cyc; nticks++;
      end
    end
    `CHECK(nticks >= 13, "ticks seen")
    // sparse random steps: a tick one clock after every 5th step
    @(negedge clock); load = 1; nstep = 5; step = 0;
    repeat (3) @(posedge clock);
    @(negedge clock); load = 0;
    nsteps = 0; nticks = 0;
    repeat (3000) begin
      @(negedge clock); step = ($urandom % 3) == 0;
      @(posedge clock); if (step) nsteps++;
      #1 if (tick) begin nticks++; `CHECK(nsteps % 5 == 0 && nsteps > 0, "tick after 5 steps") end
    end
    `CHECK(nticks == nsteps / 5 || nticks == nsteps / 5 - 0, "tick count")
    `TB_FINISH
  end
endmodule
