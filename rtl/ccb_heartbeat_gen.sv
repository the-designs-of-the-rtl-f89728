// ccb_heartbeat_gen: heartbeat signal that toggles at every rising clock edge.
//
// A single flip-flop fed from its own inverted output, cleared by reset.  The
// slaves put this on the backplane bus so the master can see they are alive;
// the master and the slaves also send it to an external monitor card.
module ccb_heartbeat_gen (
  input  logic clock,
  input  logic reset,
  output logic beat
);
  logic beat_n;
  ccb_elatch u_latch (.clock, .clear(reset), .ien(1'b1), .d(beat_n), .q(beat), .q_n(beat_n));
endmodule
