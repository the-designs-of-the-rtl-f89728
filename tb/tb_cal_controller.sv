// tb_cal_controller: the host queues calibration entries (bits 1:0 the diode
// states, bits 7:2 the number of integrations); each entry is applied at an
// integration start once the previous one has run its count, the diode
// outputs follow, and an interrupt asks for a new entry whenever the queue has
// room. The stable flag, sampled at each integration start, is low for an
// integration in which a diode was switched. Preparing a scan empties the queue.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_cal_controller;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, prepare = 0, cal_attn = 0, integ_start = 0, stable, cal_intr;
  logic [7:0] cal_reg = 0;
  logic [1:0] cal, cur;
  logic [31:0] rise_dt = 5;
  logic [15:0] fall_dt = 3;
  logic [7:0] q [$];
  bit changed;
  int left, nintr = 0, nfull = 0;
  always #5 clock = ~clock;
  cal_controller #(.QDEPTH(4)) dut (.clock, .reset, .prepare, .cal_reg, .cal_attn, .integ_start,
    .rise_dt, .fall_dt, .cal, .stable, .cal_intr);
  always @(posedge clock) if (cal_intr) nintr++;
  `TB_WATCHDOG(100000)
  task automatic push(input logic [7:0] v);
    @(negedge clock); cal_reg = v; cal_attn = 1; @(negedge clock); cal_attn = 0;
    q.push_back(v);
  endtask
  task automatic integ;
    @(negedge clock); integ_start = 1; @(negedge clock); integ_start = 0;
    repeat (10) @(negedge clock);
  endtask
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 4; r++) begin
      @(negedge clock); prepare = 1; @(negedge clock); prepare = 0;
      q.delete(); nintr = 0;
      repeat (3) @(negedge clock);
      `CHECK(nintr == 1, "request after prepare")
      for (int i = 0; i < 4; i++) push({6'(1 + $urandom % 3), 2'($urandom)});
      `CHECK(nintr == 4, "a request after every entry but the one that fills the queue")
      cur = 2'b00; left = 0;
      for (int i = 0; i < 14; i++) begin
        integ;
        changed = 0;
        if (left <= 1 && q.size() > 0) begin changed = (q[0][1:0] != cur); cur = q[0][1:0]; left = q[0][7:2]; void'(q.pop_front()); end
        else if (left > 1) left--;
        `CHECK(cal == cur, "diode states follow the queue")
        // stability is sampled at the integration start: unstable when a diode switched there
        `CHECK(stable == !changed, "stable flag of the integration")
      end
    end
    `TB_FINISH
  end
endmodule
