// tb_epp_addr_reg: the address register loads only on an address write strobe.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_epp_addr_reg;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, strobe = 0, isaddr = 0, send = 0;
  logic [7:0] a_in = 0, a_out, model = 0;
  always #5 clock = ~clock;
  epp_addr_reg dut (.clock, .reset, .a_in, .strobe, .isaddr, .send, .a_out);
  `TB_WATCHDOG(5000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    `CHECK(a_out == 0, "reset")
    repeat (1000) begin
      @(negedge clock);
      a_in = 8'($urandom); strobe = $urandom; isaddr = $urandom; send = $urandom;
      @(posedge clock); if (strobe && isaddr && !send) model = a_in;
      #1 `CHECK(a_out == model, "address register")
    end
    `TB_FINISH
  end
endmodule
