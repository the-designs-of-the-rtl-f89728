// dispatch_controller: tells the Data Dispatcher when to send and what header.
//
// Its scan_sequencer runs on run_acq like the slave controller's.  At every
// integration start (start_tick or integ_tick) EReg1 captures the header
// information of the integration now starting (time stamp, scan number,
// integration number, cal-diode states and stability, test flag) and EReg2
// takes EReg1's old contents, i.e. the integration just ended.  Dump frames
// describe the integration starting, integrated frames the one ended, so
// info is EReg1 in dump mode and EReg2 otherwise.  The integration number is
// 0 for the first integration and one more at each later start.  start_snd
// pulses at each integ_tick, and in dump mode also at start_tick, while run
// is high; the Data Dispatcher uses info two clocks later.
module dispatch_controller (
  input  logic               clock,
  input  logic               reset,
  input  logic               run,
  input  ccb_pkg::scan_cfg_t cfg,
  input  logic [31:0]        scan_id,
  input  logic [1:0]         cal,
  input  logic               stable,
  output logic               start_snd,
  output ccb_pkg::hdr_info_t info,
  output logic               dump,
  output logic [15:0]        dsize,
  output logic [1:0]         dslave
);
  import ccb_pkg::*;
  logic        hold, integ_tick, start_tick, pulse;
  logic [31:0] time_stamp, integ_n, integ_now;
  hdr_info_t   cur, e1, e2;

  assign hold = ~run;

  scan_sequencer u_seq (
    .clock, .reset, .load(hold), .state_len(cfg.state_len), .integ_len(cfg.integ_len),
    .active_a(cfg.flags.switch_a), .active_b(cfg.flags.switch_b),
    .phase_tick(), .cycle_tick(), .integ_tick, .start_tick, .time_stamp);

  assign pulse     = start_tick | integ_tick;
  assign integ_now = start_tick ? 32'd0 : integ_n + 32'd1;

  ccb_event_counter #(.WID(32)) u_integ (
    .clock, .clear(reset), .sload(pulse | hold), .up(1'b0), .down(1'b0),
    .d(hold ? 32'd0 : integ_now), .count(integ_n));

  assign cur = '{time_stamp: time_stamp, scan_id: scan_id, integ_id: integ_now,
                 cal: cal, stable: stable, test: cfg.flags.test};

  ccb_ereg #(.WID($bits(hdr_info_t))) u_e1 (.clock, .clear(reset), .ien(pulse), .d(cur), .q(e1));
  ccb_ereg #(.WID($bits(hdr_info_t))) u_e2 (.clock, .clear(reset), .ien(pulse), .d(e1),  .q(e2));

  assign dump      = cfg.flags.dump;
  assign info      = dump ? e1 : e2;
  assign start_snd = run & (integ_tick | (dump & start_tick));
  assign dsize     = cfg.dump_lim;
  assign dslave    = cfg.dump_slave;
endmodule
