// ccb_accumulator: one 32-bit phase-switch integration bin of a Sampler.
//
// Every clock the register is rewritten with base + addend, where base is the
// current value (or 0 on a start cycle) and addend is the 14-bit sample (or 0
// when the bin is not selected or blank is high).  If the bin is selected and
// the sample carries the ADC overflow flag, or the 32-bit add carries out, the
// result is forced to all ones; adding to all ones carries again, so
// saturation lasts until the next start.  On the start cycle the old total is
// loaded into a two-word PISO (low half first out) while the new integration
// begins with the first sample.  Data are readable from sout two clocks after
// start; each shift then moves one 16-bit word along the chain.
module ccb_accumulator (
  input  logic        clock,
  input  logic        reset,
  input  logic        start,
  input  logic        select,
  input  logic        blank,
  input  logic [13:0] sample,
  input  logic        overflow,
  input  logic        shift,
  input  logic [15:0] sin,
  output logic [15:0] sout
);
  logic [31:0] acc, base, addend, sum32;
  logic        carry, sat;

  assign base   = start ? 32'd0 : acc;
  assign addend = (select && !blank) ? {18'd0, sample} : 32'd0;
  assign {carry, sum32} = {1'b0, base} + {1'b0, addend};
  assign sat    = carry | (select & overflow);

  always_ff @(posedge clock or posedge reset)
    if (reset) acc <= '0;
    else       acc <= sat ? 32'hFFFF_FFFF : sum32;

  ccb_piso #(.LEN(2), .WID(16)) u_piso (
    .clock, .clear(reset), .load(start), .shift, .d(acc), .si(sin), .so(sout));
endmodule
