// ccb_system: the CCB FPGA set, one master and NSLAVES slaves.
//
// The master's control bus (clock, ADC clock, reset, slave address, read,
// write, start, blank, phase, dump, test) goes to every slave.  Each slave
// has a fixed board number; the slave being read drives the shared data bus.
// The tri-state bus is modelled by selecting the data of the slave whose
// output enable is set (zero when none is).  Each slave reads four ADCs
// (adc_sample index = slave*4 + sampler).  External parts (ADCs, USB module,
// parallel port, receiver, frequency synthesiser) connect through the ports.
module ccb_system #(
  parameter int NSLAVES = 4
) (
  input  logic        clk_fx,
  input  logic        epp_init_n,
  input  logic [7:0]  epp_data_in,
  output logic [7:0]  epp_data_out,
  output logic        epp_data_oe,
  input  logic        epp_data_strobe_n,
  input  logic        epp_addr_strobe_n,
  input  logic        epp_write_n,
  output logic        epp_wait_n,
  output logic        epp_intr,
  output logic [7:0]  usb_data,
  output logic        usb_wr,
  input  logic        usb_txe_n,
  output logic        usb_flush,
  input  logic        pps,
  output logic [1:0]  phase_sw,
  output logic [1:0]  cal_diode,
  output logic        adc_clk,
  input  logic [13:0] adc_sample [NSLAVES*4],
  input  logic [NSLAVES*4-1:0] adc_overflow,
  output logic        master_beat,
  output logic [NSLAVES-1:0] slave_beat
);
  logic        clock, reset, bus_read, bus_write, start_acq, blank, dump, test, bus_hb;
  logic [1:0]  bus_addr, phase;
  logic [15:0] bus_data;
  logic [15:0] s_data [NSLAVES];
  logic [NSLAVES-1:0] s_hb, s_oe;

  ccb_master u_master (
    .clk_fx, .epp_init_n, .epp_data_in, .epp_data_out, .epp_data_oe,
    .epp_data_strobe_n, .epp_addr_strobe_n, .epp_write_n, .epp_wait_n, .epp_intr,
    .usb_data, .usb_wr, .usb_txe_n, .usb_flush, .pps, .phase_sw, .cal_diode,
    .clock, .adc_clk, .reset, .bus_addr, .bus_read, .bus_write, .start_acq, .blank,
    .phase, .dump, .test, .bus_data, .bus_hb, .beat(master_beat));

  for (genvar s = 0; s < NSLAVES; s++) begin : g_slave
    ccb_slave #(.NSAMP(4)) u_slave (
      .clock, .reset, .adc_clk, .adc_sample(adc_sample[s*4 +: 4]),
      .adc_overflow(adc_overflow[s*4 +: 4]), .board_id(2'(s)), .addr(bus_addr),
      .read(bus_read), .write(bus_write), .start(start_acq), .blank, .phase, .dump, .test,
      .data(s_data[s]), .data_hb(s_hb[s]), .data_oe(s_oe[s]), .beat(slave_beat[s]));
  end

  always_comb begin
    bus_data = '0;
    bus_hb   = 1'b0;
    for (int s = 0; s < NSLAVES; s++)
      if (s_oe[s]) begin bus_data = s_data[s]; bus_hb = s_hb[s]; end
  end
endmodule
