// ccb_metronome: one-cycle tick after every nstep events on the step input.
//
// While load is high the period nstep is copied into a holding register and
// into the down-counter, and step is ignored.  Afterwards the counter counts
// step events down.  The tick is combinational from the counter: it fires at a
// count of 1 if step was high at the last reload (that reload already counted
// one event) and at 0 otherwise; a flag flip-flop remembers which.  The tick
// reloads the counter from the holding register.  So with step high every
// cycle the tick comes every nstep cycles; the tick lags the step that
// completes a period by one clock.  This follows the Metronome circuit of the
// design; reset clears everything asynchronously.
module ccb_metronome #(
  parameter int WID = 16
) (
  input  logic           clock,
  input  logic           reset,
  input  logic           load,
  input  logic [WID-1:0] nstep,
  input  logic           step,
  output logic           tick
);
  logic [WID-1:0] period, count;
  logic           reload, stepped;

  ccb_ereg #(.WID(WID)) u_period (
    .clock, .clear(reset), .ien(load), .d(nstep), .q(period));

  assign reload = load | tick;

  ccb_event_counter #(.WID(WID)) u_count (
    .clock, .clear(reset), .sload(reload), .up(1'b0), .down(step),
    .d(load ? nstep : period), .count(count));

  ccb_elatch u_stepped (
    .clock, .clear(reset), .ien(reload), .d(step), .q(stepped), .q_n());

  assign tick = ~((|count[WID-1:1]) | (count[0] & ~stepped));
endmodule
