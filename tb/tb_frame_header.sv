// tb_frame_header: random header fields are loaded and shifted out as eight
// words in the documented order, followed by the chain input.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_frame_header;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 0, shift = 0, dump = 0;
  logic [15:0] si = 0, so, exp_w [8];
  logic [3:0] roster = 0;
  hdr_info_t info;
  always #5 clock = ~clock;
  frame_header dut (.clock, .reset, .load, .shift, .si, .so, .info, .roster, .dump);
  `TB_WATCHDOG(20000)
  initial begin
    info = '0;
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (200) begin
      @(negedge clock);
      info.time_stamp = $urandom; info.scan_id = $urandom; info.integ_id = $urandom;
      info.cal = 2'($urandom); info.stable = $urandom; info.test = $urandom;
      roster = 4'($urandom); dump = $urandom; si = 16'($urandom);
      exp_w[0] = dump ? 16'h0003 : 16'h0001;
      exp_w[1] = {8'h00, info.cal, info.stable, info.test, roster};
      exp_w[2] = info.integ_id[15:0];   exp_w[3] = info.integ_id[31:16];
      exp_w[4] = info.scan_id[15:0];    exp_w[5] = info.scan_id[31:16];
      exp_w[6] = info.time_stamp[15:0]; exp_w[7] = info.time_stamp[31:16];
      load = 1; @(negedge clock); load = 0;
      for (int i = 0; i < 8; i++) begin
        `CHECK(so == exp_w[i], "header word")
        if ($urandom % 2) begin @(negedge clock); `CHECK(so == exp_w[i], "hold without shift") end
        shift = 1; @(negedge clock); shift = 0;
      end
      `CHECK(so == si, "chain input after the header")
    end
    `TB_FINISH
  end
endmodule
