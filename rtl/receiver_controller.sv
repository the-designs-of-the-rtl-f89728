// receiver_controller: drives the receiver's phase switches and cal diodes.
//
// While run (run_rx) is low the scan_sequencer and phase_sequencer are held
// loaded with the scan configuration and the cal_controller prepares its
// queue; when run rises they start together.  The phase_sequencer's states
// drive the two phase switches (its blanking output is not used here); the
// cal_controller sets the diodes at integration starts and reports whether
// they had settled.  int_intr pulses at the end of each integration.  This
// controller runs a round-trip delay ahead of the slave and dispatch
// controllers so that the control changes reach the data in step with them.
module receiver_controller (
  input  logic               clock,
  input  logic               reset,
  input  logic               run,
  input  ccb_pkg::scan_cfg_t cfg,
  input  logic [7:0]         cal_reg,
  input  logic               cal_attn,
  output logic [1:0]         phs,
  output logic [1:0]         cal,
  output logic               stable,
  output logic               cal_intr,
  output logic               int_intr
);
  logic hold, phase_tick, integ_tick, start_tick;

  assign hold = ~run;

  scan_sequencer u_seq (
    .clock, .reset, .load(hold), .state_len(cfg.state_len), .integ_len(cfg.integ_len),
    .active_a(cfg.flags.switch_a), .active_b(cfg.flags.switch_b),
    .phase_tick, .cycle_tick(), .integ_tick, .start_tick, .time_stamp());

  phase_sequencer u_ph (
    .clock, .reset, .load(hold), .phase_tick, .start_tick,
    .active_a(cfg.flags.switch_a), .active_b(cfg.flags.switch_b),
    .closed_a(cfg.flags.close_a), .closed_b(cfg.flags.close_b), .blank_dt(cfg.blank_dt),
    .phs_a(phs[0]), .phs_b(phs[1]), .blank());

  cal_controller #(.QDEPTH(16)) u_cal (
    .clock, .reset, .prepare(hold), .cal_reg, .cal_attn, .integ_start(start_tick | integ_tick),
    .rise_dt(cfg.diode_rise), .fall_dt(cfg.diode_fall), .cal, .stable, .cal_intr);

  assign int_intr = integ_tick;
endmodule
