// tb_state_generator: the configuration is written into the register outputs
// and a start is flagged. The switch drive of the receiver starts roundtrip
// clocks before the slave phase lines; integration interrupts, acquisition
// starts and frame requests follow the integration period; a synchronised
// start waits for the 1PPS edge; the calibration queue is applied.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_state_generator;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, pps = 0, idle = 1;
  logic [7:0] regs [NREGS];
  logic [NREGS-1:0] attn = 0;
  logic [1:0] phase_sw, cal_diode, phase, dslave;
  logic start_acq, blank, dump, test, start_snd, dd_dump, cal_intr, int_intr, sec_intr;
  logic [15:0] dsize;
  logic [4:0] holdoff;
  logic [3:0] adc_delay;
  hdr_info_t info;
  int cyc = 0, t_sw = -1, t_ph = -1, nint, nacq, nsnd, nsec = 0;
  logic [1:0] sw_d, ph_d;
  always #5 clock = ~clock;
  state_generator #(.NREGS(NREGS)) dut (.clock, .reset, .regs, .attn, .pps, .idle, .phase_sw,
    .cal_diode, .start_acq, .blank, .phase, .dump, .test, .start_snd, .info, .dd_dump, .dsize,
    .dslave, .cal_intr, .int_intr, .sec_intr, .holdoff, .adc_delay);
  always @(negedge clock) begin
    cyc++;
    sw_d <= phase_sw; ph_d <= phase;
    if (phase_sw != sw_d && t_sw < 0) t_sw = cyc;
    if (phase != ph_d && t_ph < 0) t_ph = cyc;
    nint += int_intr; nacq += start_acq; nsnd += start_snd; nsec += sec_intr;
  end
  task automatic set16(input int a, input int v);
    regs[a] = 8'(v >> 8); regs[a+1] = 8'(v);
  endtask
  task automatic start_scan(input bit sync);
    regs[A_START_SCAN] = {7'd0, sync};
    @(negedge clock); attn[A_START_SCAN] = 1; @(negedge clock); attn[A_START_SCAN] = 0;
  endtask
  `TB_WATCHDOG(100000)
  initial begin
    foreach (regs[i]) regs[i] = 0;
    repeat (2) @(posedge clock); #1 reset = 0;
    regs[A_SCAN_FLAGS] = 8'b0000_1100;      // both switches active
    set16(A_STATE_LEN, 50);
    regs[A_BLANK_DT] = 8'd4;
    set16(A_INTEG_LEN, 2);
    regs[A_ROUNDTRIP] = 8'd7;
    regs[A_HOLDOFF] = 8'd3;
    regs[A_DUMP_ADC] = 8'b0110;
    set16(A_DUMP_LIM, 300);
    regs[A_ADC_DELAY] = 8'd6;
    t_sw = -1; t_ph = -1;                  // ignore changes left by reset
    start_scan(0);
    nint = 0; nacq = 0; nsnd = 0;
    repeat (20 + 3 * 400) @(negedge clock);
    `CHECK(t_sw > 0 && t_ph > 0 && t_ph - t_sw == 7, "slaves follow the receiver by the roundtrip time")
    `CHECK(nint == 3, "integration interrupts (400 clocks each)")
    `CHECK(nacq == 4, "acquisition starts")
    `CHECK(nsnd == 3, "frame requests")
    `CHECK(holdoff == 5'd3 && adc_delay == 4'd6 && dsize == 16'd300 && dslave == 2'd1, "settings")
    `CHECK(!dump && !test && !dd_dump, "normal mode")
    // synchronised start: nothing happens until the 1PPS edge
    t_sw = -1;
    start_scan(1);
    repeat (100) @(negedge clock);
    `CHECK(t_sw < 0, "synchronised scan waits for 1PPS")
    @(negedge clock); pps = 1; repeat (3) @(negedge clock); pps = 0;
    repeat (80) @(negedge clock);
    `CHECK(nsec == 1, "one second interrupt")
    `CHECK(t_sw > 0, "scan runs after 1PPS")
    // dump mode with the test pattern
    regs[A_SCAN_FLAGS] = 8'b0000_0011;
    start_scan(0);
    repeat (30) @(negedge clock);
    `CHECK(dump && test && dd_dump && phase == 2'd2, "dump mode selects the sampler")
    `TB_FINISH
  end
endmodule
