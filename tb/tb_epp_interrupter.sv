// tb_epp_interrupter: requests on the three lines raise a two-clock interrupt
// pulse; while a request stays unacknowledged the pulse repeats only after the
// hold-off time ({holdoff, 8'hFF} + 1 clocks); an address read acknowledges
// and returns the pending lines as the mask {sec, int, cal}.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_epp_interrupter;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, cal_intr = 0, int_intr = 0, sec_intr = 0;
  logic strobe = 0, isaddr = 0, send = 0, intr;
  logic [4:0] holdoff = 5'd1;
  logic [7:0] mask;
  int rises [$];
  logic intr_d = 0;
  always #5 clock = ~clock;
  epp_interrupter dut (.clock, .reset, .cal_intr, .int_intr, .sec_intr, .strobe, .isaddr, .send,
                       .holdoff, .intr, .mask);
  int cyc = 0;
  always @(posedge clock) begin
    cyc++;
    intr_d <= intr;
    if (intr && !intr_d) rises.push_back(cyc);
  end
  `TB_WATCHDOG(60000)
  task automatic pulse(ref logic s);
    @(negedge clock); s = 1; @(negedge clock); s = 0;
  endtask
  task automatic ack;
    @(negedge clock); strobe = 1; isaddr = 1; send = 1; @(negedge clock); strobe = 0; isaddr = 0; send = 0;
  endtask
  int width;
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (5) @(negedge clock);
    `CHECK(!intr && rises.size() == 0, "quiet after reset")
    pulse(cal_intr);
    repeat (3) @(negedge clock);
    `CHECK(rises.size() == 1, "first interrupt within three clocks")
    // unacknowledged: repeats after the hold-off
    repeat (3 * 512) @(negedge clock);
    `CHECK(rises.size() >= 3, "interrupt repeated while not acknowledged")
    for (int i = 1; i < rises.size(); i++)
      `CHECK(rises[i] - rises[i-1] == 32'h1FF + 1, "repeat spacing = hold-off + 1")
    `CHECK(mask == 8'h00, "mask empty before acknowledge")
    ack;
    `CHECK(mask == 8'h01, "mask shows the calibration request")
    rises.delete();
    repeat (2000) @(negedge clock);
    `CHECK(rises.size() == 0, "no interrupt after acknowledge")
    // two lines, longer hold-off
    holdoff = 5'd3;
    pulse(sec_intr); pulse(int_intr);
    repeat (4 * 1024 + 10) @(negedge clock);
    `CHECK(rises.size() >= 3, "repeats with hold-off 3")
    for (int i = 1; i < rises.size(); i++)
      `CHECK(rises[i] - rises[i-1] == 32'h3FF + 1, "repeat spacing with hold-off 3")
    ack;
    `CHECK(mask == 8'h06, "mask shows second and integration requests")
    ack;
    `CHECK(mask == 8'h00, "second acknowledge clears the mask")
    // pulse width is two clocks, once the hold-off has run out
    repeat (1100) @(negedge clock);
    pulse(cal_intr);
    width = 0;
    repeat (6) begin @(negedge clock); if (intr) width++; end
    `CHECK(width == 2, "interrupt pulse two clocks wide")
    `TB_FINISH
  end
endmodule
