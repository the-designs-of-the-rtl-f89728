// tb_epp_reg_bank: random data strobes over all addresses, including ones past
// the last register; the readback, the register outputs and the attention
// flags are checked against a model.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_epp_reg_bank;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, strobe = 0, isaddr = 0, send = 0;
  logic [4:0] addr = 0;
  logic [7:0] d_in = 0, d_out, regs [20], model [20];
  logic [19:0] attn, exp_attn;
  always #5 clock = ~clock;
  epp_reg_bank #(.NREGS(20), .ABITS(5)) dut (.clock, .reset, .strobe, .isaddr, .send, .addr,
                                             .d_in, .d_out, .regs, .attn);
  `TB_WATCHDOG(10000)
  initial begin
    foreach (model[i]) model[i] = 0;
    exp_attn = 0;
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (3000) begin
      @(negedge clock);
      addr = 5'($urandom); d_in = 8'($urandom); strobe = $urandom; isaddr = $urandom; send = $urandom;
      #1 `CHECK(d_out == (addr < 20 ? model[addr] : 8'h00), "readback")
      `CHECK(attn == exp_attn, "attention flags")
      @(posedge clock);
      exp_attn = 0;
      if (strobe && !isaddr && !send && addr < 20) begin model[addr] = d_in; exp_attn[addr] = 1; end
      #1 foreach (regs[i]) `CHECK(regs[i] == model[i], "register output")
    end
    `TB_FINISH
  end
endmodule
