// ccb_elatch: a single D flip-flop with a synchronous input enable.
//
// The flip-flop captures d at every rising clock edge where ien is high and
// otherwise recaptures its own value, so no gated clock is needed.  clear
// resets it asynchronously.  q_n is the inverted output, which several
// circuits use to form one-cycle pulses.  Structure as described for the
// ELatch component; the asynchronous clear is this design's reading.
module ccb_elatch (
  input  logic clock,
  input  logic clear,
  input  logic ien,
  input  logic d,
  output logic q,
  output logic q_n
);
  always_ff @(posedge clock or posedge clear)
    if (clear)    q <= 1'b0;
    else if (ien) q <= d;
  assign q_n = ~q;
endmodule
