// tb_ccb_slave: one slave board. Four ADC streams are summed per phase and read
// back over the bus as 32 words (sampler 0 bin 0 low word first); the board
// answers only to its own address; dump mode returns the raw word of the
// sampler chosen by the phase lines; the heartbeat line toggles.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_slave;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, read = 0, write = 0, start = 0, blank = 0, dump = 0, test = 0;
  logic [13:0] adc_sample [4];
  logic [13:0] reg1 [4];
  logic [3:0]  adc_overflow = 0;
  logic [1:0]  board_id = 2'd2, addr = 0, phase = 0;
  logic [15:0] data;
  logic data_hb, data_oe, beat, prev_beat;
  longint tot [4][4], snap [4][4];
  always #5 clock = ~clock;
  ccb_slave dut (.clock, .reset, .adc_clk(clock), .adc_sample, .adc_overflow, .board_id, .addr,
                 .read, .write, .start, .blank, .phase, .dump, .test, .data, .data_hb, .data_oe, .beat);
  `TB_WATCHDOG(100000)
  task automatic step(input bit st);
    @(negedge clock);
    start = st; phase = 2'($urandom); blank = ($urandom % 5) == 0;
    @(posedge clock);
    if (st) begin snap = tot; foreach (tot[s, b]) tot[s][b] = 0; end
    if (!blank) foreach (tot[s]) tot[s][phase] += reg1[s];
    #1 foreach (reg1[s]) begin reg1[s] = adc_sample[s]; adc_sample[s] = 14'($urandom); end
  endtask
  initial begin
    foreach (adc_sample[s]) begin adc_sample[s] = 0; reg1[s] = 0; end
    repeat (2) @(posedge clock); #1 reset = 0;
    foreach (tot[s, b]) tot[s][b] = 0;
    step(1);
    for (int p = 0; p < 10; p++) begin
      repeat (30 + $urandom % 100) step(0);
      step(1);
      @(negedge clock); start = 0; blank = 1;
      // another board's address: no output enable, chain does not move
      addr = board_id + 1; read = 1; @(negedge clock);
      `CHECK(!data_oe, "other address not enabled")
      addr = board_id;
      for (int s = 0; s < 4; s++)
        for (int b = 0; b < 4; b++)
          for (int h = 0; h < 2; h++) begin
            #1 `CHECK(data_oe, "own address enabled")
            `CHECK(data == (h ? snap[s][b][31:16] : snap[s][b][15:0]), "bin word")
            @(negedge clock);
          end
      read = 0;
      foreach (reg1[s]) reg1[s] = adc_sample[s];
    end
    // dump mode: the phase lines pick the sampler whose raw word is driven
    dump = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clock); phase = 2'($urandom);
      foreach (adc_sample[s]) adc_sample[s] = 14'($urandom);
      @(negedge clock); #1
      `CHECK(data == {2'b00, adc_sample[phase]}, "dump raw word")
    end
    prev_beat = beat;
    repeat (10) begin @(negedge clock); `CHECK(beat == ~prev_beat && data_hb == beat, "heartbeat"); prev_beat = beat; end
    `TB_FINISH
  end
endmodule
