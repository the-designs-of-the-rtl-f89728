// tb_phase_sequencer: with both switches active the switch states walk the
// Gray sequence (b,a) = 00, 01, 11, 10 from their closed levels; with one
// switch active it alternates and the other stays at its closed level; the
// blanking line is high for blank_dt clocks after each start or phase tick
// when any switch is active.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_phase_sequencer;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 0, phase_tick = 0, start_tick = 0;
  logic active_a = 0, active_b = 0, closed_a = 0, closed_b = 0, phs_a, phs_b, blank;
  logic [7:0] blank_dt = 3;
  logic ea, eb;
  int k, since;
  always #5 clock = ~clock;
  phase_sequencer dut (.clock, .reset, .load, .phase_tick, .start_tick, .active_a, .active_b,
                       .closed_a, .closed_b, .blank_dt, .phs_a, .phs_b, .blank);
  `TB_WATCHDOG(200000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 32; r++) begin
      repeat (30) @(negedge clock);  // let the last blanking interval end
      {closed_b, closed_a, active_b, active_a} = 4'(r % 16);
      blank_dt = 8'(1 + $urandom % 20);
      load = 1; @(negedge clock); load = 0;
      k = 0;
      start_tick = 1; @(negedge clock); start_tick = 0;
      since = 0;
      for (int c = 0; c < 600; c++) begin
        // expected states of switch a and b in state k of the cycle
        if (active_a && active_b) begin ea = (k % 4 == 1) || (k % 4 == 2); eb = (k % 4 >= 2); end
        else if (active_a)       begin ea = k[0]; eb = 1'b0; end
        else if (active_b)       begin ea = 1'b0; eb = k[0]; end
        else                     begin ea = 1'b0; eb = 1'b0; end
        `CHECK(phs_a == (ea ^ closed_a) && phs_b == (eb ^ closed_b), "switch states")
        `CHECK(blank == ((active_a || active_b) && since < blank_dt), "blanking")
        phase_tick = (c % 37 == 36);
        @(negedge clock);
        if (phase_tick) begin k++; since = 0; end else since++;
        phase_tick = 0;
      end
    end
    `TB_FINISH
  end
endmodule
