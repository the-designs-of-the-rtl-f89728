// slave_controller: the control signals of the four slave FPGAs.
//
// Same scan_sequencer and phase_sequencer as the receiver controller, started
// by run_acq, a round-trip delay later.  phase selects the integration bin
// (the phase-switch state) or, in dump mode, the ADC (sampler) to dump; blank
// tells the slaves to drop samples while switches settle; start_acq pulses at
// the start of every integration (start_tick or integ_tick); dump and test
// come straight from the scan flags.
module slave_controller (
  input  logic               clock,
  input  logic               reset,
  input  logic               run,
  input  ccb_pkg::scan_cfg_t cfg,
  output logic               blank,
  output logic [1:0]         phase,
  output logic               dump,
  output logic               test,
  output logic               start_acq
);
  logic hold, phase_tick, integ_tick, start_tick, phs_a, phs_b;
  assign hold = ~run;

  scan_sequencer u_seq (
    .clock, .reset, .load(hold), .state_len(cfg.state_len), .integ_len(cfg.integ_len),
    .active_a(cfg.flags.switch_a), .active_b(cfg.flags.switch_b),
    .phase_tick, .cycle_tick(), .integ_tick, .start_tick, .time_stamp());

  phase_sequencer u_ph (
    .clock, .reset, .load(hold), .phase_tick, .start_tick,
    .active_a(cfg.flags.switch_a), .active_b(cfg.flags.switch_b),
    .closed_a(cfg.flags.close_a), .closed_b(cfg.flags.close_b), .blank_dt(cfg.blank_dt),
    .phs_a, .phs_b, .blank);

  assign dump      = cfg.flags.dump;
  assign test      = cfg.flags.test;
  assign phase     = dump ? cfg.dump_sampler : {phs_b, phs_a};
  assign start_acq = integ_tick | start_tick;
endmodule
