// state_generator: the central sequencer of the master FPGA.
//
// It reads the register values and attn flags of the Control Gateway.  The
// scan_initiator starts scans on writes of start_scan_reg and freezes the
// configuration; the receiver_controller drives the phase switches and cal
// diodes; the slave_controller and dispatch_controller, started a round-trip
// delay later, drive the slaves and the Data Dispatcher.  The pps_gateway
// conditions the 1PPS input, used for synchronised scan starts and for the
// once-a-second interrupt.  Also output: the interrupt requests, the
// interrupt hold-off and the ADC clock delay taken from the frozen
// configuration.
module state_generator #(
  parameter int NREGS = 20
) (
  input  logic               clock,
  input  logic               reset,
  input  logic [7:0]         regs [NREGS],
  input  logic [NREGS-1:0]   attn,
  input  logic               pps,
  input  logic               idle,
  // receiver
  output logic [1:0]         phase_sw,
  output logic [1:0]         cal_diode,
  // slaves
  output logic               start_acq,
  output logic               blank,
  output logic [1:0]         phase,
  output logic               dump,
  output logic               test,
  // data dispatcher
  output logic               start_snd,
  output ccb_pkg::hdr_info_t info,
  output logic               dd_dump,
  output logic [15:0]        dsize,
  output logic [1:0]         dslave,
  // control gateway
  output logic               cal_intr,
  output logic               int_intr,
  output logic               sec_intr,
  output logic [4:0]         holdoff,
  output logic [3:0]         adc_delay
);
  import ccb_pkg::*;
  scan_cfg_t   cfg;
  logic        run_rx, run_acq, stable;
  logic [31:0] scan_id;

  pps_gateway u_pps (.clock, .reset, .pps, .sec(sec_intr));

  scan_initiator #(.PREP_DELAY(4)) u_init (
    .clock, .reset, .start(attn[A_START_SCAN]), .sync(regs[A_START_SCAN][0]),
    .config_regs(regs), .pps(sec_intr), .idle, .run_rx, .run_acq, .scan_regs(cfg), .scan_id);

  receiver_controller u_rx (
    .clock, .reset, .run(run_rx), .cfg, .cal_reg(regs[A_CAL_DIODE]), .cal_attn(attn[A_CAL_DIODE]),
    .phs(phase_sw), .cal(cal_diode), .stable, .cal_intr, .int_intr);

  slave_controller u_sl (
    .clock, .reset, .run(run_acq), .cfg, .blank, .phase, .dump, .test, .start_acq);

  dispatch_controller u_dc (
    .clock, .reset, .run(run_acq), .cfg, .scan_id, .cal(cal_diode), .stable,
    .start_snd, .info, .dump(dd_dump), .dsize, .dslave);

  assign holdoff   = cfg.holdoff_dt;
  assign adc_delay = cfg.adc_delay;
endmodule
