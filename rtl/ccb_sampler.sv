// ccb_sampler: acquisition and integration for one ADC.
//
// Reg1 captures the 14-bit ADC sample and its overflow bit on the rising edge
// of the phase-shifted ADC clock.  MUX1 passes either that, or a fake sample
// from the signal injector with no overflow when test is high, to a
// ccb_integrator and to the raw output (16 bits: a zero, the overflow bit,
// the sample).  The integrator's PISO chain is carried through sin/sout.
// Reg1 lives in the adc_clk domain; the delay between adc_clk and clock is
// chosen so that the value is stable when the system clock samples it.
module ccb_sampler (
  input  logic        clock,
  input  logic        reset,
  input  logic        adc_clk,
  input  logic [13:0] adc_sample,
  input  logic        adc_overflow,
  input  logic [13:0] fake,
  input  logic        test,
  input  logic        blank,
  input  logic [1:0]  phase,
  input  logic        start,
  input  logic        shift,
  input  logic [15:0] sin,
  output logic [15:0] sout,
  output logic [15:0] raw
);
  logic [14:0] reg1, mux1;

  always_ff @(posedge adc_clk or posedge reset)
    if (reset) reg1 <= '0;
    else       reg1 <= {adc_overflow, adc_sample};

  assign mux1 = test ? {1'b0, fake} : reg1;
  assign raw  = {1'b0, mux1};

  ccb_integrator u_int (
    .clock, .reset, .start, .blank, .phase, .sample(mux1[13:0]), .overflow(mux1[14]),
    .shift, .sin, .sout);
endmodule
