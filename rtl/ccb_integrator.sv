// ccb_integrator: four phase-switch bins fed by one sample stream.
//
// The 2-bit phase input is decoded so that exactly one ccb_accumulator adds
// each sample.  The accumulators' two-word PISOs are chained: sout comes from
// bin 0, bin 0 shifts in from bin 1, and bin 3 from sin, so a read-out gives
// bin0 low, bin0 high, bin1 low, ... bin3 high, then whatever is upstream.
// The chain order is this design's choice.
module ccb_integrator (
  input  logic        clock,
  input  logic        reset,
  input  logic        start,
  input  logic        blank,
  input  logic [1:0]  phase,
  input  logic [13:0] sample,
  input  logic        overflow,
  input  logic        shift,
  input  logic [15:0] sin,
  output logic [15:0] sout
);
  logic [15:0] chain [5];
  assign chain[4] = sin;

  for (genvar b = 0; b < 4; b++) begin : g_bin
    ccb_accumulator u_acc (
      .clock, .reset, .start, .select(phase == 2'(b)), .blank, .sample, .overflow,
      .shift, .sin(chain[b+1]), .sout(chain[b]));
  end

  assign sout = chain[0];
endmodule
