// clock_conditioner: 10 MHz system clock and delayed ADC clock from 100 MHz.
//
// clk_fx is the 100 MHz output of the FPGA's frequency synthesiser (10 MHz
// reference x 10).  A 10-stage shift register clocked by it, with q0 taking
// the serial input, divides it by 10: the input is the complement of all of
// q0..q4 when they are all equal, otherwise q0 again, so each half period
// is 5 stages long and a corrupted pattern heals within 4 clocks.  clock is
// q0 (50% duty cycle); adc_clk is q[k], delayed k x 10 ns, with k =
// adc_delay modulo 10.  The synthesiser and global clock buffers are FPGA
// primitives and are outside this module.
module clock_conditioner (
  input  logic       clk_fx,
  input  logic       reset,
  input  logic [3:0] adc_delay,
  output logic       clock,
  output logic       adc_clk
);
  logic [9:0] q;
  logic       sin;
  logic [3:0] tap;

  assign sin = (~|q[4:0]) | (q[0] & ~&q[4:1]);

  always_ff @(posedge clk_fx or posedge reset)
    if (reset) q <= '0;
    else       q <= {q[8:0], sin};

  assign tap     = (adc_delay >= 4'd10) ? adc_delay - 4'd10 : adc_delay;
  assign clock   = q[0];
  assign adc_clk = q[tap];
endmodule
