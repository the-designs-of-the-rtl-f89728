// phase_sequencer: phase-switch states and the blanking flag.
//
// While load is high, two 4-entry one-bit rotating registers are filled with
// the state sequences of switches A and B for one phase-switch cycle, worked
// out from which switches are active and their initial (closed) states: both
// active, a 4-state gray code with A changing first ((a,b), (~a,b), (~a,~b),
// (a,~b)); one active, that switch toggles each state and the other holds;
// none active, both hold.  Each phase_tick rotates both registers; the heads
// are phs_a and phs_b.  At start_tick and each phase_tick, if any switch is
// active, a counter is loaded with blank_dt and blank stays high until it has
// counted down to zero (blank_dt clocks).
module phase_sequencer (
  input  logic       clock,
  input  logic       reset,
  input  logic       load,
  input  logic       phase_tick,
  input  logic       start_tick,
  input  logic       active_a,
  input  logic       active_b,
  input  logic       closed_a,
  input  logic       closed_b,
  input  logic [7:0] blank_dt,
  output logic       phs_a,
  output logic       phs_b,
  output logic       blank
);
  logic [3:0] seq_a, seq_b;
  logic [7:0] bcount;
  logic       bload, bnz;

  // Entry i (bit i) is the state of the i-th phase-switch state of a cycle.
  always_comb begin
    unique case ({active_b, active_a})
      2'b11:   begin seq_a = {closed_a, ~closed_a, ~closed_a, closed_a};
                     seq_b = {~closed_b, ~closed_b, closed_b, closed_b}; end
      2'b01:   begin seq_a = {~closed_a, closed_a, ~closed_a, closed_a};
                     seq_b = {4{closed_b}}; end
      2'b10:   begin seq_a = {4{closed_a}};
                     seq_b = {~closed_b, closed_b, ~closed_b, closed_b}; end
      default: begin seq_a = {4{closed_a}}; seq_b = {4{closed_b}}; end
    endcase
  end

  ccb_piso #(.LEN(4), .WID(1)) u_pa (.clock, .clear(reset), .load, .shift(phase_tick),
                                     .d(seq_a), .si(phs_a), .so(phs_a));
  ccb_piso #(.LEN(4), .WID(1)) u_pb (.clock, .clear(reset), .load, .shift(phase_tick),
                                     .d(seq_b), .si(phs_b), .so(phs_b));

  assign bnz   = |bcount;
  assign bload = (start_tick | phase_tick) & (active_a | active_b);
  ccb_event_counter #(.WID(8)) u_blank (
    .clock, .clear(reset), .sload(bload), .up(1'b0), .down(bnz), .d(blank_dt), .count(bcount));
  assign blank = bnz;
endmodule
