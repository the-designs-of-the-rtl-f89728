// tb_byte_streamer: a frame of NHEADER header words plus N read words is sent
// to a USB FIFO model as bytes, low byte first, never writing while the
// chip's TXE# is high; the streamer then reports empty.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_byte_streamer;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 0, read = 0, shift, write, txe_n, empty;
  logic [15:0] d;
  logic [7:0] q;
  logic [15:0] words [$], sent [$];
  always #50 clock = ~clock;
  byte_streamer #(.NHEADER(8)) dut (.clock, .reset, .load, .read, .d, .shift, .q, .write, .txe_n, .empty);
  ft245_model #(.LONG_PCT(3)) u_usb (.clock, .wr(write), .data(q), .txe_n);
  assign d = words.size() ? words[0] : 16'h0000;
  always @(posedge clock) if (shift) sent.push_back(words.pop_front());
  `TB_WATCHDOG(400000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int f = 0; f < 12; f++) begin
      int n; n = (f == 0) ? 0 : 1 + $urandom % 200;
      words.delete(); sent.delete(); u_usb.bytes.delete();
      for (int i = 0; i < 8 + n; i++) words.push_back(16'($urandom));
      @(negedge clock); load = 1; read = (n > 0);
      @(negedge clock); load = 0;
      for (int i = 1; i < n; i++) @(negedge clock);
      read = 0;
      while (!empty) @(negedge clock);
      repeat (10) @(negedge clock);
      `CHECK(sent.size() == 8 + n, "every word shifted once")
      `CHECK(u_usb.bytes.size() == 2 * (8 + n), "two bytes per word")
      for (int i = 0; i < sent.size() && 2*i+1 < u_usb.bytes.size(); i++)
        `CHECK({u_usb.bytes[2*i+1], u_usb.bytes[2*i]} == sent[i], "low byte first")
    end
    `CHECK(u_usb.overruns == 0, "no write while TXE# high")
    `CHECK(u_usb.nlong > 0, "host stall exercised")
    `TB_FINISH
  end
endmodule
