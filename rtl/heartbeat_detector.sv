// heartbeat_detector: checks that one slave's heartbeat toggles every clock.
//
// While select is high, ELatch1 samples hb and ELatch2 takes ELatch1's old
// value; alive is their XOR, true when the last two samples differ.  While
// select is low both hold, so alive keeps the verdict of the last read-out.
module heartbeat_detector (
  input  logic clock,
  input  logic reset,
  input  logic select,
  input  logic hb,
  output logic alive
);
  logic h1, h2;
  ccb_elatch u_e1 (.clock, .clear(reset), .ien(select), .d(hb), .q(h1), .q_n());
  ccb_elatch u_e2 (.clock, .clear(reset), .ien(select), .d(h1), .q(h2), .q_n());
  assign alive = h1 ^ h2;
endmodule
