// tb_ccb_integrator: four phase bins summed independently; after each start
// the eight words must come out bin 0 first, low half first, then the chain input.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_integrator;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0, blank = 0, overflow = 0, shift = 0;
  logic [1:0] phase = 0;
  logic [13:0] sample = 0;
  logic [15:0] sin = 16'h5A5A, sout;
  longint tot [4], snap [4];
  always #5 clock = ~clock;
  ccb_integrator dut (.clock, .reset, .start, .blank, .phase, .sample, .overflow, .shift, .sin, .sout);
  `TB_WATCHDOG(100000)
  task automatic step(input bit st, input bit ovf_ok);
    @(negedge clock);
    start = st; phase = 2'($urandom); blank = ($urandom % 6) == 0;
    sample = 14'($urandom); overflow = ovf_ok && ($urandom % 40 == 0);
    @(posedge clock);
    if (st) begin snap = tot; foreach (tot[b]) tot[b] = 0; end
    if (!blank) tot[phase] += sample;
    if (tot[phase] > 64'hFFFF_FFFF) tot[phase] = 64'hFFFF_FFFF;
    if (overflow) tot[phase] = 64'hFFFF_FFFF;
  endtask
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    foreach (tot[b]) tot[b] = 0;
    step(1, 0);
    for (int p = 0; p < 40; p++) begin
      repeat (20 + $urandom % 300) step(0, p % 4 == 3);
      step(1, 0);
      @(negedge clock); start = 0; overflow = 0; phase = 0; blank = 1;
      for (int b = 0; b < 4; b++) begin
        `CHECK(sout == snap[b][15:0], "bin low word")
        shift = 1; @(negedge clock);
        `CHECK(sout == snap[b][31:16], "bin high word")
        @(negedge clock);
      end
      shift = 0;
      `CHECK(sout == sin, "chain input after eight words")
      // the readout cycles were blanked, so the bins hold only the start sample
    end
    `TB_FINISH
  end
endmodule
