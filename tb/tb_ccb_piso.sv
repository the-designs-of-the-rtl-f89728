// tb_ccb_piso: load, hold and shift behaviour of an 8 x 16 PISO.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_piso;
  int checks = 0, failures = 0;
  logic clock = 0, clear = 1, load = 0, shift = 0;
  logic [127:0] d = 0;
  logic [15:0] si = 0, so;
  logic [15:0] model [$];
  always #5 clock = ~clock;
  ccb_piso #(.LEN(8), .WID(16)) dut (.clock, .clear, .load, .shift, .d, .si, .so);
  `TB_WATCHDOG(5000)
  initial begin
    repeat (2) @(posedge clock);
    #1 clear = 0;
    for (int i = 0; i < 8; i++) model.push_back(16'h0);
    repeat (1500) begin
      @(negedge clock);
      load = ($urandom % 10) == 0; shift = $urandom; si = $urandom;
      for (int i = 0; i < 4; i++) d[i*32 +: 32] = $urandom;
      @(posedge clock);
      if (load) begin
        model.delete();
        for (int i = 0; i < 8; i++) model.push_back(d[i*16 +: 16]);
      end else if (shift) begin
        void'(model.pop_front()); model.push_back(si);
      end
      #1 `CHECK(so == model[0], "piso output")
    end
    `TB_FINISH
  end
endmodule
