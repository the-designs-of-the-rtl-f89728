// pps_gateway: turns the asynchronous 1 us 1PPS pulse into a one-clock pulse.
//
// Latch 1 synchronises the input (and gives it a clock to settle); latch 3
// outputs latch1 & ~latch2, so sec is high for exactly one clock, its rising
// edge 1-2 clocks after the rising edge of the 1PPS input.
module pps_gateway (
  input  logic clock,
  input  logic reset,
  input  logic pps,
  output logic sec
);
  logic l1, l2;
  always_ff @(posedge clock or posedge reset)
    if (reset) begin l1 <= 1'b0; l2 <= 1'b0; sec <= 1'b0; end
    else begin l1 <= pps; l2 <= l1; sec <= l1 & ~l2; end
endmodule
