// tb_clock_conditioner: the system clock is the fast clock divided by ten
// with a five-high, five-low duty cycle, and the ADC clock is the same wave
// delayed by adc_delay fast-clock periods (modulo ten).
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_clock_conditioner;
  int checks = 0, failures = 0;
  logic clk_fx = 0, reset = 1, clock, adc_clk;
  logic [3:0] adc_delay = 0;
  logic hist [$];
  int hi, lo;
  always #5 clk_fx = ~clk_fx;
  clock_conditioner dut (.clk_fx, .reset, .adc_delay, .clock, .adc_clk);
  initial begin repeat (40000) @(posedge clk_fx); failures++; $display("FAIL: watchdog"); `TB_FINISH end
  initial begin
    repeat (3) @(posedge clk_fx); #1 reset = 0;
    repeat (30) @(posedge clk_fx);  // settle
    for (int d = 0; d < 16; d++) begin
      @(negedge clk_fx); adc_delay = 4'(d);
      hist.delete();
      repeat (200) begin
        @(negedge clk_fx);
        hist.push_back(clock);
        if (hist.size() > 10) begin
          `CHECK(hist[hist.size()-1] == hist[hist.size()-11], "clock period of ten")
          `CHECK(adc_clk == hist[hist.size() - 1 - (d % 10)], "ADC clock delayed by adc_delay")
        end
      end
      hi = 0; lo = 0;
      for (int i = hist.size() - 10; i < hist.size(); i++) if (hist[i]) hi++; else lo++;
      `CHECK(hi == 5 && lo == 5, "duty cycle five high, five low")
    end
    `TB_FINISH
  end
endmodule
