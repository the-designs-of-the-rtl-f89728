// ccb_event_counter: up/down counter with a synchronous parallel load.
//
// At each rising clock edge: sload loads d (whatever up and down are); else
// up alone increments, down alone decrements; up and down together, or
// neither, leave the count alone.  clear zeroes it asynchronously.  The
// behaviour is the Event Counter of the design; WID defaults to 16.
module ccb_event_counter #(
  parameter int WID = 16
) (
  input  logic           clock,
  input  logic           clear,
  input  logic           sload,
  input  logic           up,
  input  logic           down,
  input  logic [WID-1:0] d,
  output logic [WID-1:0] count
);
  always_ff @(posedge clock or posedge clear)
    if (clear)               count <= '0;
    else if (sload)          count <= d;
    else if (up && !down)    count <= count + 1'b1;
    else if (down && !up)    count <= count - 1'b1;
endmodule
