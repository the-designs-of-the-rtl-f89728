// tb_epp_handshaker: random host cycles. Each strobe gives exactly one
// one-clock strobe pulse with the right isaddr/send qualifiers, and wait_n
// follows the handshake: high while a strobe is seen, back low once the host
// returns write_n high.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_epp_handshaker;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, epp_dstb_n = 1, epp_astb_n = 1, epp_write_n = 1;
  logic epp_wait_n, strobe, isaddr, send;
  logic [7:0] host_data, dev_data = 0, rd;
  int pulses = 0, expected = 0;
  bit exp_addr, exp_send;
  always #5 clock = ~clock;
  epp_handshaker dut (.clock, .reset, .data_strobe_n(epp_dstb_n), .addr_strobe_n(epp_astb_n),
                      .write_n(epp_write_n), .wait_n(epp_wait_n), .strobe, .isaddr, .send);
  `include "tb/epp_host.svh"
  always @(posedge clock) if (!reset && strobe) begin
    pulses++;
    checks++;
    if (isaddr != exp_addr || send != exp_send) begin failures++; $display("FAIL: qualifiers"); end
  end
  `TB_WATCHDOG(20000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    `CHECK(epp_wait_n == 0, "wait low at idle")
    for (int i = 0; i < 300; i++) begin
      exp_addr = $urandom; exp_send = $urandom;
      expected++;
      epp_cycle(exp_addr, !exp_send, 8'($urandom), rd);
      `CHECK(pulses == expected, "one strobe pulse per cycle")
      `CHECK(epp_wait_n == 0, "wait low after cycle")
    end
    // wait_n rises within two clocks of the strobe (one synchroniser, one register)
    @(negedge clock); epp_write_n = 0; epp_dstb_n = 0;
    @(negedge clock); `CHECK(epp_wait_n == 0, "wait not yet high after one clock")
    @(negedge clock); `CHECK(epp_wait_n == 1, "wait high after two clocks")
    epp_dstb_n = 1;
    repeat (3) @(negedge clock);
    `CHECK(epp_wait_n == 1, "wait held high while write_n is low")
    epp_write_n = 1; @(negedge clock); `CHECK(epp_wait_n == 0, "wait drops with write_n high")
    `TB_FINISH
  end
endmodule
