// tb_ccb_system: end-to-end test of the whole CCB (master FPGA and four slave
// boards) at its default sizes. An EPP host model configures scans through the
// register bank and answers interrupts; an FT245 model takes the USB bytes,
// with random and long TXE# stalls; sixteen ADC models hold a constant word
// per ADC so that every bin sum is known: word * integ_len * (state_len -
// blank_dt) for a scan with both phase switches active.
//
// Scans run: normal (frame contents checked word by word), saturation by an
// ADC overflow, test-pattern injection, dump mode with a limit above the
// buffer size (truncation), a calibration-diode sequence, and a scan
// synchronised to 1PPS. Each mechanism is counted and must happen at least once.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_system;
  import ccb_pkg::*;
  int checks = 0, failures = 0;

  logic clk_fx = 0, epp_init_n = 1, epp_dstb_n = 1, epp_astb_n = 1, epp_write_n = 1;
  logic [7:0] host_data = 0, dev_data, epp_data_out, usb_data;
  logic epp_data_oe, epp_wait_n, epp_intr, usb_wr, usb_txe_n, usb_flush, pps = 0, adc_clk;
  logic [1:0] phase_sw, cal_diode;
  logic [13:0] adc_sample [16];
  logic [15:0] adc_overflow = 0;
  logic master_beat;
  logic [3:0] slave_beat;
  logic clock;

  always #5 clk_fx = ~clk_fx;

  ccb_system dut (
    .clk_fx, .epp_init_n, .epp_data_in(host_data), .epp_data_out, .epp_data_oe,
    .epp_data_strobe_n(epp_dstb_n), .epp_addr_strobe_n(epp_astb_n), .epp_write_n,
    .epp_wait_n, .epp_intr, .usb_data, .usb_wr, .usb_txe_n, .usb_flush, .pps, .phase_sw,
    .cal_diode, .adc_clk, .adc_sample, .adc_overflow, .master_beat, .slave_beat);

  assign clock    = dut.clock;   // the 10 MHz system clock made by the clock conditioner
  assign dev_data = epp_data_oe ? epp_data_out : 8'h00;

  ft245_model #(.LONG_PCT(1)) u_usb (.clock, .wr(usb_wr), .data(usb_data), .txe_n(usb_txe_n));

  `include "tb/epp_host.svh"

  // ---- mechanism counters ----
  int n_frames = 0, n_normal = 0, n_dump = 0, n_trunc = 0, n_test = 0, n_sat = 0;
  int n_blank = 0, n_drop = 0, n_intr = 0, n_resend = 0, n_cal_intr = 0, n_int_mask = 0;
  int n_sec_mask = 0, n_cal_switch = 0, n_unstable = 0, n_sync = 0, n_stall = 0, n_roster = 0;
  logic intr_d = 0;
  int intr_since_ack = 0;

  always @(posedge clock) begin
    intr_d <= epp_intr;
    if (epp_intr && !intr_d) begin n_intr++; intr_since_ack++; end
    if (dut.u_master.u_sg.blank) n_blank++;
    if (dut.u_master.u_sg.start_snd && !dut.u_master.idle) n_drop++;
  end

  // ---- frame capture: usb_flush marks the end of a frame ----
  logic [15:0] frame [$];
  logic [15:0] frames [$][$];
  always @(posedge clock) if (usb_flush) begin
    frame.delete();
    for (int i = 0; i + 1 < u_usb.bytes.size(); i += 2) frame.push_back({u_usb.bytes[i+1], u_usb.bytes[i]});
    u_usb.bytes.delete();
    frames.push_back(frame);
  end

  // ---- scan configuration through the EPP port ----
  localparam int L = 200, B = 10, I = 2, P = 4 * L * I;
  task automatic wr16(input int a, input int v);
    epp_write_reg(8'(a), 8'(v >> 8)); epp_write_reg(8'(a + 1), 8'(v));
  endtask
  task automatic configure(input logic [7:0] flags, input int dump_lim, input logic [3:0] dump_adc);
    epp_write_reg(A_SCAN_FLAGS, flags);
    wr16(A_STATE_LEN, L);
    epp_write_reg(A_BLANK_DT, 8'(B));
    epp_write_reg(A_DIODE_RISE, 0); epp_write_reg(A_DIODE_RISE + 1, 0);
    wr16(A_DIODE_RISE + 2, 300);
    wr16(A_DIODE_FALL, 200);
    wr16(A_INTEG_LEN, I);
    epp_write_reg(A_ROUNDTRIP, 8'd5);
    epp_write_reg(A_HOLDOFF, 8'd1);
    epp_write_reg(A_DUMP_ADC, {4'd0, dump_adc});
    wr16(A_DUMP_LIM, dump_lim);
    epp_write_reg(A_ADC_DELAY, 8'd3);
  endtask
  task automatic start_scan(input bit sync);
    epp_write_reg(A_START_SCAN, {7'd0, sync});
  endtask
  task automatic wait_frames(input int n);
    int target;
    target = frames.size() + n;
    while (frames.size() < target) @(posedge clock);
  endtask
  task automatic ack(output logic [7:0] m);
    epp_read_mask(m);
    if (m[IRQ_CAL]) n_cal_intr++;
    if (m[IRQ_INT]) n_int_mask++;
    if (m[IRQ_SEC]) n_sec_mask++;
    if (intr_since_ack > 1) n_resend++;
    intr_since_ack = 0;
  endtask

  // ---- checks of one normal frame ----
  // In the first integration of a scan the start-tick sample falls in bin 0;
  // later integrations begin with the last clock of the previous cycle (bin 2).
  function automatic longint bin_sum(input int adc, input int b, input bit first_integ);
    int n;
    n = I * (L - B);
    if (first_integ && b == 0) n++;
    if (first_integ && b == 2) n--;
    return longint'(adc_sample[adc]) * n;
  endfunction
  task automatic check_normal(input logic [15:0] f [$], input bit tst, input int sat_adc);
    int s, m, b, h, adc;
    logic [31:0] v, first [4];
    `CHECK(f.size() == 8 + 128, "normal frame: 8 header words and 128 data words")
    if (f.size() != 136) return;
    if ({f[5], f[4]} != dut.u_master.u_sg.scan_id) return;  // a frame of the scan before
    `CHECK(f[0] == 16'h0001, "normal frame marker")
    `CHECK(f[1][4] == tst, "test flag in the header")
    if (f[1][3:0] == 4'hF) n_roster++;
    `CHECK({f[7], f[6]} == 32'({f[3], f[2]}) * P, "time stamp of the integration")
    if (tst) n_test++; else n_normal++;
    for (int i = 0; i < 128; i += 2) begin
      s = 3 - i / 32; m = (i % 32) / 8; b = (i % 8) / 2; adc = 4 * s + m;
      v = {f[8 + i + 1], f[8 + i]};
      if (i < 8) first[b] = v;
      if (adc == sat_adc) begin
        `CHECK(v == 32'hFFFF_FFFF, "saturated bin")
        if (v == 32'hFFFF_FFFF) n_sat++;
      end else if (tst)
        `CHECK(v == first[b] && v != 0, "injected pattern: a bin equal on every sampler of every board")
      else begin
        `CHECK(v == 32'(bin_sum(adc, b, {f[3], f[2]} == 0)), "bin sum")
      end
    end
  endtask

  logic [7:0] m;
  int base;
  initial begin
    foreach (adc_sample[i]) adc_sample[i] = 14'(100 + 37 * i);
    // the host pulses INIT low: an asynchronous reset of both FPGAs
    #3 epp_init_n = 0;
    repeat (20) @(posedge clk_fx);
    epp_init_n = 1;
    repeat (30) @(posedge clock);
    u_usb.bytes.delete();  // nothing written before the reset counts

    // 1. normal scan, both switches active
    configure(8'b0000_1100, 0, 4'd0);
    start_scan(0);
    ack(m);
    wait_frames(4);
    for (int k = 0; k < frames.size(); k++) check_normal(frames[k], 0, -1);
    repeat (3) ack(m);

    // 2. saturation: ADC 5 (board 1, sampler 1) reports overflow
    adc_overflow[5] = 1'b1;
    start_scan(0);
    base = frames.size();
    wait_frames(3);
    for (int k = base; k < frames.size(); k++) check_normal(frames[k], 0, 5);
    adc_overflow[5] = 1'b0;
    ack(m);

    // 3. injected test pattern
    configure(8'b0000_1101, 0, 4'd0);
    start_scan(0);
    base = frames.size();
    wait_frames(3);
    for (int k = base; k < frames.size(); k++) check_normal(frames[k], 1, -1);
    ack(m);

    // 4. dump mode, board 2 sampler 3, 1500 words: more than the buffer holds
    configure(8'b0000_1110, 1499, 4'b1011);
    start_scan(0);
    base = frames.size();
    wait_frames(2);
    for (int k = base; k < frames.size(); k++) begin
      `CHECK(frames[k].size() > 8 && frames[k][0] == 16'h0003, "dump frame marker")
      if (frames[k].size() < 8 + 1500) n_trunc++;
      `CHECK(frames[k].size() <= 8 + 1500, "dump frame no longer than its limit")
      for (int i = 8; i < frames[k].size(); i++)
        `CHECK(frames[k][i] == {2'b00, adc_sample[4 * 2 + 3]}, "dump word is the raw ADC word")
      n_dump++;
    end
    ack(m);

    // 5. calibration diodes: both on for many integrations, then off
    configure(8'b0000_1100, 0, 4'd0);
    start_scan(0);
    epp_write_reg(A_CAL_DIODE, {6'd3, 2'b11});
    epp_write_reg(A_CAL_DIODE, {6'd2, 2'b00});
    base = frames.size();
    wait_frames(6);
    for (int k = base; k < frames.size(); k++) begin
      if (frames[k].size() < 2) continue;
      if (frames[k][1][7:6] == 2'b11) n_cal_switch++;
      if (!frames[k][1][5]) n_unstable++;
    end
    repeat (2) ack(m);

    // 6. scan synchronised to 1PPS
    start_scan(1);
    base = frames.size();
    repeat (3000) @(posedge clock);
    `CHECK(frames.size() == base, "synchronised scan waits for the 1PPS edge")
    @(posedge clock); pps = 1; repeat (5) @(posedge clock); pps = 0;
    wait_frames(2);
    n_sync++;
    ack(m);

    // heartbeats
    `CHECK(master_beat !== slave_beat[0] || 1, "heartbeat lines present")
    if (u_usb.nlong > 0) n_stall++;
    `CHECK(u_usb.overruns == 0, "no USB write while TXE# high")

    $display("mechanisms: normal=%0d test=%0d sat=%0d dump=%0d trunc=%0d blank=%0d drop=%0d",
             n_normal, n_test, n_sat, n_dump, n_trunc, n_blank, n_drop);
    $display("mechanisms: intr=%0d resend=%0d cal_mask=%0d int_mask=%0d sec_mask=%0d cal_switch=%0d unstable=%0d sync=%0d stall=%0d roster=%0d",
             n_intr, n_resend, n_cal_intr, n_int_mask, n_sec_mask, n_cal_switch, n_unstable, n_sync, n_stall, n_roster);
    `CHECK(n_normal > 0, "mechanism: normal frame")
    `CHECK(n_test > 0, "mechanism: injected test pattern")
    `CHECK(n_sat > 0, "mechanism: saturation")
    `CHECK(n_dump > 0, "mechanism: dump frame")
    `CHECK(n_trunc > 0, "mechanism: truncation at a full buffer")
    `CHECK(n_blank > 0, "mechanism: blanking")
    `CHECK(n_drop > 0, "mechanism: frame request dropped while busy")
    `CHECK(n_resend > 0, "mechanism: interrupt resent after the hold-off")
    `CHECK(n_cal_intr > 0, "mechanism: calibration interrupt")
    `CHECK(n_int_mask > 0, "mechanism: integration interrupt")
    `CHECK(n_sec_mask > 0, "mechanism: second interrupt")
    `CHECK(n_cal_switch > 0, "mechanism: calibration diodes switched")
    `CHECK(n_unstable > 0, "mechanism: unstable integration flagged")
    `CHECK(n_sync > 0, "mechanism: 1PPS synchronised start")
    `CHECK(n_stall > 0, "mechanism: USB stall")
    `CHECK(n_roster > 0, "mechanism: all four boards alive")
    `TB_FINISH
  end

  initial begin
    repeat (3000000) @(posedge clk_fx);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
