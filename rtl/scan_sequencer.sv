// scan_sequencer: the timing ticks of a scan.
//
// Three cascaded ccb_metronome instances count clocks into phase-switch
// states (state_len clocks), states into phase-switch cycles (nactive = 4, 2
// or 1 states for 2, 1 or 0 active switches) and cycles into integrations
// (integ_len cycles).  While load is high the metronomes are held loaded and
// nothing runs.  Each metronome adds a clock of delay, so the state, cycle
// and integration ticks are re-timed by 3, 2 and 1 registers to line up with
// each other and with start_tick.  start_tick is a one-clock pulse seen at
// the second rising edge after the first edge at which load is seen low; the
// first phase_tick follows it by state_len clocks, the first integ_tick by
// state_len*nactive*integ_len clocks.  time counts clocks from 0 at
// start_tick.  Tick names: phase_tick ends a phase-switch state, cycle_tick a
// phase-switch cycle, integ_tick an integration.  The metronome ticks are
// masked while load is high (this design's choice): a metronome cleared by
// reset ticks at once, and the mask keeps that tick from being counted by the
// next metronome or from leaving as a spurious tick.
module scan_sequencer (
  input  logic        clock,
  input  logic        reset,
  input  logic        load,
  input  logic [15:0] state_len,
  input  logic [15:0] integ_len,
  input  logic        active_a,
  input  logic        active_b,
  output logic        phase_tick,
  output logic        cycle_tick,
  output logic        integ_tick,
  output logic        start_tick,
  output logic [31:0] time_stamp
);
  logic [15:0] nactive;
  logic        t1, t2, t3, g1, g2, g3, l1, l2;
  logic [2:0]  d1;
  logic [1:0]  d2;

  assign nactive = (active_a && active_b) ? 16'd4 : (active_a || active_b) ? 16'd2 : 16'd1;

  ccb_metronome #(.WID(16)) u_m1 (.clock, .reset, .load, .nstep(state_len), .step(1'b1), .tick(t1));
  ccb_metronome #(.WID(16)) u_m2 (.clock, .reset, .load, .nstep(nactive),   .step(g1),   .tick(t2));
  ccb_metronome #(.WID(16)) u_m3 (.clock, .reset, .load, .nstep(integ_len), .step(g2),   .tick(t3));

  assign g1 = t1 & ~load;
  assign g2 = t2 & ~load;
  assign g3 = t3 & ~load;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      d1 <= '0; d2 <= '0; integ_tick <= 1'b0;
      l1 <= 1'b1; l2 <= 1'b0; start_tick <= 1'b0;
    end else begin
      d1         <= {d1[1:0], g1};
      d2         <= {d2[0], g2};
      integ_tick <= g3;
      l1         <= load;
      l2         <= ~load & l1;
      start_tick <= l2;
    end

  assign phase_tick = d1[2];
  assign cycle_tick = d2[1];

  ccb_event_counter #(.WID(32)) u_time (
    .clock, .clear(reset), .sload(l2), .up(1'b1), .down(1'b0), .d('0), .count(time_stamp));
endmodule
