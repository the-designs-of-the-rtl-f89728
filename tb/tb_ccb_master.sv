// tb_ccb_master: the master FPGA alone, with a model of the slave bus that
// answers each read with the board number and a running word count and with
// live heartbeats. The host configures a scan over EPP; frames of 136 words
// reach the USB model with the header of each integration; the receiver and
// slave phase lines switch; the integration interrupt is seen in the mask;
// the system clock is the fast clock divided by ten.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_ccb_master;
  import ccb_pkg::*;
  int checks = 0, failures = 0;
  logic clk_fx = 0, epp_init_n = 1, epp_dstb_n = 1, epp_astb_n = 1, epp_write_n = 1;
  logic [7:0] host_data = 0, dev_data, epp_data_out, usb_data;
  logic epp_data_oe, epp_wait_n, epp_intr, usb_wr, usb_txe_n, usb_flush, pps = 0;
  logic [1:0] phase_sw, cal_diode, bus_addr, phase;
  logic clock, adc_clk, reset, bus_read, bus_write, start_acq, blank, dump, test, beat, bus_hb;
  logic [15:0] bus_data;
  logic [3:0] hb = 0;
  int nword [4];
  logic [15:0] frame [$];
  int nframes = 0, nphase = 0, nsw = 0, nclk = 0;
  logic [1:0] ph_d = 0, sw_d = 0;
  logic [7:0] m;
  always #5 clk_fx = ~clk_fx;
  ccb_master dut (.clk_fx, .epp_init_n, .epp_data_in(host_data), .epp_data_out, .epp_data_oe,
    .epp_data_strobe_n(epp_dstb_n), .epp_addr_strobe_n(epp_astb_n), .epp_write_n, .epp_wait_n,
    .epp_intr, .usb_data, .usb_wr, .usb_txe_n, .usb_flush, .pps, .phase_sw, .cal_diode, .clock,
    .adc_clk, .reset, .bus_addr, .bus_read, .bus_write, .start_acq, .blank, .phase, .dump, .test,
    .bus_data, .bus_hb, .beat);
  assign dev_data = epp_data_oe ? epp_data_out : 8'h00;
  ft245_model #(.LONG_PCT(0)) u_usb (.clock, .wr(usb_wr), .data(usb_data), .txe_n(usb_txe_n));
  `include "tb/epp_host.svh"
  assign bus_data = {bus_addr, 14'(nword[bus_addr])};
  assign bus_hb   = hb[bus_addr];
  always @(posedge clock) begin
    hb <= ~hb;
    if (bus_read) nword[bus_addr] <= nword[bus_addr] + 1;
    ph_d <= phase; sw_d <= phase_sw;
    if (phase != ph_d) nphase++;
    if (phase_sw != sw_d) nsw++;
    if (usb_flush) begin
      frame.delete();
      for (int i = 0; i + 1 < u_usb.bytes.size(); i += 2) frame.push_back({u_usb.bytes[i+1], u_usb.bytes[i]});
      u_usb.bytes.delete();
      if (frame.size() == 136) begin
        nframes++;
        `CHECK(frame[0] == 16'h0001, "frame marker")
        // the roster is latched at the frame start, from the reads of the frame before
        if (nframes > 1) `CHECK(frame[1][3:0] == 4'hF, "roster of live boards")
        `CHECK({frame[7], frame[6]} == 32'({frame[3], frame[2]}) * 32'd800, "time stamp")
        for (int i = 0; i < 128; i++)
          `CHECK(frame[8+i] == {2'(3 - i / 32), 14'(nword[3 - i / 32] - 32 + i % 32)}, "data word")
      end
    end
  end
  always @(posedge clk_fx) nclk++;
  initial begin repeat (400000) @(posedge clk_fx); failures++; $display("FAIL: watchdog"); `TB_FINISH end
  initial begin
    foreach (nword[i]) nword[i] = 0;
    #3 epp_init_n = 0;
    repeat (20) @(posedge clk_fx);
    `CHECK(reset, "INIT low resets the master")
    epp_init_n = 1;
    repeat (10) @(posedge clock);
    u_usb.bytes.delete();  // nothing written before the reset counts
    nclk = 0;
    repeat (10) @(posedge clock);
    `CHECK(nclk == 100, "system clock is the fast clock divided by ten")
    epp_write_reg(A_SCAN_FLAGS, 8'b0000_1100);
    epp_write_reg(A_STATE_LEN, 0); epp_write_reg(A_STATE_LEN + 1, 8'd100);
    epp_write_reg(A_BLANK_DT, 8'd5);
    epp_write_reg(A_INTEG_LEN, 0); epp_write_reg(A_INTEG_LEN + 1, 8'd2);
    epp_write_reg(A_ROUNDTRIP, 8'd3);
    epp_write_reg(A_START_SCAN, 8'd0);
    while (nframes < 4) @(posedge clock);
    `CHECK(nphase > 10 && nsw > 10, "receiver and slave phase lines switch")
    epp_read_mask(m);
    `CHECK(m[IRQ_INT], "integration interrupt pending")
    `CHECK(!bus_write && !dump && !test, "normal mode, bus never written")
    `TB_FINISH
  end
endmodule
