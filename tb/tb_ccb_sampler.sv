// tb_ccb_sampler: ADC words are registered on adc_clk and summed per phase;
// in test mode the injected word replaces the ADC. The raw output follows the mux.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_sampler;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, adc_clk, adc_overflow = 0, test = 0, blank = 0, start = 0, shift = 0;
  logic [13:0] adc_sample = 0, fake = 0, reg1;
  logic [1:0] phase = 0;
  logic [15:0] sin = 16'h1234, sout, raw;
  longint tot [4], snap [4];
  always #5 clock = ~clock;
  assign adc_clk = clock;
  ccb_sampler dut (.clock, .reset, .adc_clk, .adc_sample, .adc_overflow, .fake, .test, .blank,
                   .phase, .start, .shift, .sin, .sout, .raw);
  `TB_WATCHDOG(100000)
  task automatic step(input bit st);
    logic [13:0] used;
    @(negedge clock);
    start = st; phase = 2'($urandom); blank = ($urandom % 6) == 0;
    fake = 14'($urandom);
    #1 used = test ? fake : reg1;
    `CHECK(raw == {2'b00, used}, "raw word follows the test mux")
    @(posedge clock);
    if (st) begin snap = tot; foreach (tot[b]) tot[b] = 0; end
    if (!blank) tot[phase] += used;
    #1 reg1 = adc_sample; adc_sample = 14'($urandom);
  endtask
  initial begin
    reg1 = 0;
    repeat (2) @(posedge clock); #1 reset = 0;
    foreach (tot[b]) tot[b] = 0;
    step(1);
    for (int p = 0; p < 20; p++) begin
      test = p[0];
      repeat (20 + $urandom % 100) step(0);
      step(1);
      @(negedge clock); start = 0; blank = 1;
      for (int b = 0; b < 4; b++) begin
        `CHECK(sout == snap[b][15:0], "bin low word")
        shift = 1; @(negedge clock);
        `CHECK(sout == snap[b][31:16], "bin high word")
        @(negedge clock);
      end
      shift = 0; reg1 = adc_sample;  // the ADC register kept loading during readout
      `CHECK(sout == sin, "chain input")
    end
    `TB_FINISH
  end
endmodule
