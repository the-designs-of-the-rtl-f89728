// ccb_master: the master FPGA of the CCB.
//
// The clock_conditioner makes the 10 MHz system clock and the ADC clock from
// the 100 MHz synthesiser output.  The control_gateway talks to the computer
// over the EPP parallel port; the state_generator runs scans from the
// registers it holds; the data_dispatcher reads the slaves over the
// backplane bus and streams frames to the FT245 USB chip; a heartbeat goes to
// the monitor card.  The EPP init line (active low) resets everything.  The
// bidirectional EPP data lines are split into in, out and output enable.
module ccb_master (
  input  logic        clk_fx,
  input  logic        epp_init_n,
  // EPP parallel port
  input  logic [7:0]  epp_data_in,
  output logic [7:0]  epp_data_out,
  output logic        epp_data_oe,
  input  logic        epp_data_strobe_n,
  input  logic        epp_addr_strobe_n,
  input  logic        epp_write_n,
  output logic        epp_wait_n,
  output logic        epp_intr,
  // USB module
  output logic [7:0]  usb_data,
  output logic        usb_wr,
  input  logic        usb_txe_n,
  output logic        usb_flush,
  // timing
  input  logic        pps,
  // receiver
  output logic [1:0]  phase_sw,
  output logic [1:0]  cal_diode,
  // slave control bus
  output logic        clock,
  output logic        adc_clk,
  output logic        reset,
  output logic [1:0]  bus_addr,
  output logic        bus_read,
  output logic        bus_write,
  output logic        start_acq,
  output logic        blank,
  output logic [1:0]  phase,
  output logic        dump,
  output logic        test,
  // slave data bus
  input  logic [15:0] bus_data,
  input  logic        bus_hb,
  // monitor card
  output logic        beat
);
  import ccb_pkg::*;
  logic [7:0]       regs [NREGS];
  logic [NREGS-1:0] attn;
  logic             cal_intr, int_intr, sec_intr, idle, start_snd, dd_dump;
  logic [4:0]       holdoff;
  logic [3:0]       adc_delay;
  logic [15:0]      dsize;
  logic [1:0]       dslave;
  hdr_info_t        info;

  assign reset = ~epp_init_n;

  clock_conditioner u_clk (.clk_fx, .reset, .adc_delay, .clock, .adc_clk);

  control_gateway #(.NREGS(NREGS)) u_cg (
    .clock, .reset, .epp_data_in, .epp_data_out, .epp_data_oe,
    .data_strobe_n(epp_data_strobe_n), .addr_strobe_n(epp_addr_strobe_n), .write_n(epp_write_n),
    .wait_n(epp_wait_n), .intr(epp_intr), .regs, .attn, .cal_intr, .int_intr, .sec_intr, .holdoff);

  state_generator #(.NREGS(NREGS)) u_sg (
    .clock, .reset, .regs, .attn, .pps, .idle, .phase_sw, .cal_diode,
    .start_acq, .blank, .phase, .dump, .test,
    .start_snd, .info, .dd_dump, .dsize, .dslave,
    .cal_intr, .int_intr, .sec_intr, .holdoff, .adc_delay);

  data_dispatcher #(.DEPTH(1024)) u_dd (
    .clock, .reset, .start(start_snd), .dump(dd_dump), .dsize, .dslave, .info,
    .bus_data, .bus_hb, .read(bus_read), .slave(bus_addr), .idle,
    .usb_q(usb_data), .usb_wr, .usb_txe_n, .usb_flush);

  ccb_heartbeat_gen u_hb (.clock, .reset, .beat);

  assign bus_write = 1'b0;
endmodule
