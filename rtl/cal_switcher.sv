// cal_switcher: drives one calibration diode and tracks its settling.
//
// pending is the diode state at the head of the Cal Controller's queue.  MUX1
// continuously gives the settling time the next load would start: rise_dt if
// the diode would turn on, fall_dt if it would turn off, else the remaining
// count.  load (an entry popped) latches pending into actual and loads that
// time into a 32-bit down-counter that stops at zero.  update (every
// integration start) latches stable = (settling time remaining == 0), using
// MUX1's value when a load happens on the same edge and the counter otherwise.
// Reset clears the diode to off; a scan preparation does not touch it.
module cal_switcher (
  input  logic        clock,
  input  logic        reset,
  input  logic        load,
  input  logic        update,
  input  logic        pending,
  input  logic [31:0] rise_dt,
  input  logic [15:0] fall_dt,
  output logic        actual,
  output logic        stable
);
  logic [31:0] mux1, mux2, count;
  logic        turn_on, turn_off, nz;

  assign turn_on  = pending & ~actual;
  assign turn_off = ~pending & actual;
  assign mux1 = turn_on ? rise_dt : turn_off ? {16'd0, fall_dt} : count;
  assign nz   = |count;
  assign mux2 = load ? mux1 : count;

  ccb_elatch u_act (.clock, .clear(reset), .ien(load), .d(pending), .q(actual), .q_n());
  ccb_elatch u_stb (.clock, .clear(reset), .ien(update), .d(~|mux2), .q(stable), .q_n());
  ccb_event_counter #(.WID(32)) u_cnt (
    .clock, .clear(reset), .sload(load), .up(1'b0), .down(nz), .d(mux1), .count);
endmodule
