// ccb_signal_injector: pseudo-random fake ADC samples for test mode.
//
// A 14-bit Fibonacci LFSR shifting every clock from q0 towards q13, with
// feedback sin = q13 ^ q4 ^ q2 ^ q0 into q0.  It is maximal length: every
// value 1..2^14-1 appears once per 16383 clocks.  start (and reset, a choice
// of this design) sets all bits to one, so each integration sees the same
// sequence.  The all-zero state is not recovered from, as intended.
module ccb_signal_injector (
  input  logic        clock,
  input  logic        reset,
  input  logic        start,
  output logic [13:0] q
);
  logic sin;
  assign sin = q[13] ^ q[4] ^ q[2] ^ q[0];

  always_ff @(posedge clock or posedge reset)
    if (reset)      q <= '1;
    else if (start) q <= '1;
    else            q <= {q[12:0], sin};
endmodule
