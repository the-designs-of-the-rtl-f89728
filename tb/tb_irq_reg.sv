// tb_irq_reg: a request sets irq; an acknowledge copies irq into the mask and
// clears irq unless a new request arrives in the same clock.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_irq_reg;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, intr = 0, ack = 0, irq, mask, m_irq = 0, m_mask = 0;
  always #5 clock = ~clock;
  irq_reg dut (.clock, .reset, .intr, .ack, .irq, .mask);
  `TB_WATCHDOG(5000)
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    repeat (2000) begin
      @(negedge clock);
      intr = ($urandom % 4) == 0; ack = ($urandom % 4) == 0;
      @(posedge clock);
      if (ack) m_mask = m_irq;
      if (intr || ack) m_irq = intr;
      #1 `CHECK(irq == m_irq && mask == m_mask, "irq and mask")
    end
    `TB_FINISH
  end
endmodule
