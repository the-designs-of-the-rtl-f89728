// tb_epp_data_reg: the register loads on load, and attn pulses one clock later.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_epp_data_reg;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, load = 0, attn, prev_load = 0;
  logic [7:0] d = 0, q, model = 0;
  always #5 clock = ~clock;
  epp_data_reg dut (.clock, .reset, .load, .d, .q, .attn);
  `TB_WATCHDOG(5000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (1000) begin
      @(negedge clock);
      d = 8'($urandom); load = ($urandom % 3) == 0;
      `CHECK(attn == prev_load, "attn follows the load of the previous clock")
      @(posedge clock); if (load) model = d; prev_load = load;
      #1 `CHECK(q == model, "data register")
    end
    `TB_FINISH
  end
endmodule
