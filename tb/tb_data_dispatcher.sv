// tb_data_dispatcher: the data path of the master. A model of the slave bus
// answers each read with a word that names the board and the word number;
// boards 1 and 3 have a live heartbeat. A start sends a frame of eight header
// words and 128 data words to a USB FIFO model; dump mode sends dsize+1 raw
// words of one board; a start during a frame is dropped; usb_flush pulses once
// per frame and idle returns.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_data_dispatcher;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0, dump = 0, read, idle, usb_wr, usb_txe_n, usb_flush;
  logic [15:0] dsize = 0, bus_data;
  logic [1:0] dslave = 0, slave;
  logic [7:0] usb_q;
  logic [3:0] beat = 0;
  logic bus_hb;
  int nword [4], nflush = 0;
  logic [15:0] got [$];
  hdr_info_t info;
  always #50 clock = ~clock;
  data_dispatcher #(.DEPTH(1024)) dut (.clock, .reset, .start, .dump, .dsize, .dslave, .info,
    .bus_data, .bus_hb, .read, .slave, .idle, .usb_q, .usb_wr, .usb_txe_n, .usb_flush);
  ft245_model #(.LONG_PCT(1)) u_usb (.clock, .wr(usb_wr), .data(usb_q), .txe_n(usb_txe_n));
  assign bus_data = {slave, 14'(nword[slave])};
  assign bus_hb   = beat[slave];
  always @(posedge clock) begin
    beat <= beat ^ 4'b1010;
    if (read) nword[slave] <= nword[slave] + 1;
    if (usb_flush) nflush++;
  end
  `TB_WATCHDOG(300000)
  task automatic frame(input bit dmp, input int n, input bit first, output int ok);
    ok = 1;
    foreach (nword[i]) nword[i] = 0;
    u_usb.bytes.delete(); got.delete(); nflush = 0;
    info.integ_id = $urandom; info.scan_id = $urandom; info.time_stamp = $urandom;
    dump = dmp;
    @(negedge clock); start = 1; @(negedge clock); start = 0;
    repeat (20) @(negedge clock);
    `CHECK(!idle, "busy during a frame")
    // a second start during the frame is dropped
    start = 1; @(negedge clock); start = 0;
    while (!idle) @(negedge clock);
    repeat (5) @(negedge clock);
    for (int i = 0; i + 1 < u_usb.bytes.size(); i += 2) got.push_back({u_usb.bytes[i+1], u_usb.bytes[i]});
    `CHECK(got.size() == 8 + n, "frame length")
    `CHECK(nflush == 1, "one flush per frame")
    if (got.size() == 8 + n) begin
      `CHECK(got[0] == {14'd0, dmp, 1'b1}, "header word 0")
      // the roster is latched when the frame starts, so it reflects the reads of the frame before
      if (!first) `CHECK(got[1][3:0] == 4'b1010, "roster of live boards")
      `CHECK({got[3], got[2]} == info.integ_id, "integration id")
      for (int i = 0; i < n; i++)
        if (dmp) `CHECK(got[8+i] == {dslave, 14'(i)}, "dump word")
        else     `CHECK(got[8+i] == {2'(3 - i / 32), 14'(i % 32)}, "data word order")
    end
  endtask
  int ok;
  initial begin
    info = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    `CHECK(idle, "idle after reset")
    frame(0, 128, 1, ok);
    frame(0, 128, 0, ok);
    dsize = 16'd299; dslave = 2'd2;
    frame(1, 300, 0, ok);
    dump = 0;
    frame(0, 128, 0, ok);
    `TB_FINISH
  end
endmodule
