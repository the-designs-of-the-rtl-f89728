// tb_control_gateway: an EPP host writes every register and reads it back,
// checks the register outputs and attention flags, and reads the interrupt
// mask with an address read after requests.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_control_gateway;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, epp_dstb_n = 1, epp_astb_n = 1, epp_write_n = 1, epp_wait_n, intr;
  logic [7:0] host_data = 0, dev_data, epp_data_out, regs [20], model [20], v;
  logic epp_data_oe, cal_intr = 0, int_intr = 0, sec_intr = 0;
  logic [19:0] attn, seen_attn = 0;
  int nintr = 0;
  always #5 clock = ~clock;
  control_gateway #(.NREGS(20)) dut (
    .clock, .reset, .epp_data_in(host_data), .epp_data_out, .epp_data_oe,
    .data_strobe_n(epp_dstb_n), .addr_strobe_n(epp_astb_n), .write_n(epp_write_n),
    .wait_n(epp_wait_n), .intr, .regs, .attn, .cal_intr, .int_intr, .sec_intr, .holdoff(5'd0));
  assign dev_data = epp_data_oe ? epp_data_out : 8'h00;
  `include "tb/epp_host.svh"
  always @(posedge clock) begin seen_attn <= seen_attn | attn; if (intr) nintr++; end
  `TB_WATCHDOG(200000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 20; i++) begin model[i] = 8'($urandom); epp_write_reg(8'(i), model[i]); end
      for (int i = 0; i < 20; i++) `CHECK(regs[i] == model[i], "register output")
      `CHECK(seen_attn == 20'hFFFFF, "every register flagged attention")
      seen_attn = 0;
      for (int i = 19; i >= 0; i--) begin epp_read_reg(8'(i), v); `CHECK(v == model[i], "readback"); end
      `CHECK(seen_attn == 0, "reads raise no attention")
    end
    epp_read_mask(v); `CHECK(v == 0, "no pending interrupt")
    @(negedge clock); cal_intr = 1; @(negedge clock); cal_intr = 0;
    repeat (5) @(negedge clock);
    `CHECK(nintr > 0, "interrupt line pulsed")
    epp_read_mask(v); `CHECK(v == 8'h01, "mask after calibration request")
    @(negedge clock); sec_intr = 1; @(negedge clock); sec_intr = 0;
    repeat (5) @(negedge clock);
    epp_read_mask(v); `CHECK(v == 8'h04, "mask after second request")
    epp_read_mask(v); `CHECK(v == 8'h00, "mask cleared")
    `TB_FINISH
  end
endmodule
