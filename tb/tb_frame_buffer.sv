// tb_frame_buffer: a read burst is buffered and sent as the eight-word header
// followed by the data words, byte by byte to a USB FIFO model; a burst longer
// than the buffer stops, as the slave reader does, when the buffer is full,
// and the frame is then sent truncated at the buffer size.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_frame_buffer;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 64;
  logic clock = 0, reset = 1, read = 0, dump = 0, full, empty, write, txe_n;
  logic [15:0] d = 0, data [$], got [$];
  logic [7:0] q;
  logic [3:0] roster = 4'b1010;
  hdr_info_t info;
  always #50 clock = ~clock;
  frame_buffer #(.DEPTH(DEPTH)) dut (.clock, .reset, .read, .d, .info, .roster, .dump, .full,
                                     .empty, .q, .write, .txe_n);
  ft245_model #(.LONG_PCT(2)) u_usb (.clock, .wr(write), .data(q), .txe_n);
  `TB_WATCHDOG(400000)
  int nfull = 0;
  initial begin
    info = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int f = 0; f < 8; f++) begin
      int n, kept;
      n = (f == 3) ? 200 : 1 + $urandom % 60;
      u_usb.bytes.delete(); data.delete(); got.delete();
      info.integ_id = $urandom; info.scan_id = $urandom; info.time_stamp = $urandom;
      info.test = $urandom; dump = $urandom;
      @(negedge clock); read = 1;
      for (int i = 0; i < n; i++) begin
        d = 16'($urandom);
        #1 if (!full) data.push_back(d); else begin nfull++; break; end
        @(negedge clock);
      end
      read = 0;
      while (!empty) @(negedge clock);
      repeat (10) @(negedge clock);
      kept = data.size();
      for (int i = 0; i + 1 < u_usb.bytes.size(); i += 2) got.push_back({u_usb.bytes[i+1], u_usb.bytes[i]});
      `CHECK(got.size() == 8 + kept, "header plus kept words")
      if (got.size() >= 8) begin
        `CHECK(got[0] == {14'd0, dump, 1'b1}, "header word 0")
        `CHECK(got[1][3:0] == roster && got[1][4] == info.test, "header word 1")
        `CHECK({got[3], got[2]} == info.integ_id, "integration id")
        `CHECK({got[5], got[4]} == info.scan_id, "scan id")
        `CHECK({got[7], got[6]} == info.time_stamp, "time stamp")
        for (int i = 0; i < kept && 8 + i < got.size(); i++) `CHECK(got[8+i] == data[i], "data word")
      end
      if (f == 3) `CHECK(kept >= DEPTH && kept < n, "long burst truncated once the buffer is full")
    end
    `CHECK(nfull > 0, "buffer full exercised")
    `CHECK(u_usb.overruns == 0, "no write while TXE# high")
    `TB_FINISH
  end
endmodule
