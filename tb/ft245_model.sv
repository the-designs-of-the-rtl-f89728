// ft245_model: behavioural model of the transmit side of an FT245-style USB
// FIFO chip, for testbenches only. A byte is taken on the falling edge of wr;
// txe_n then goes high 2 ns later (the chip's fill time) and stays high for a
// random number of clocks, sometimes a long stretch to mimic a host that is
// not reading. Received bytes are kept in the queue `bytes`.
`timescale 1ns/1ps
module ft245_model #(
  parameter int LONG_PCT = 2
) (
  input  logic       clock,
  input  logic       wr,
  input  logic [7:0] data,
  output logic       txe_n
);
  logic [7:0] bytes [$];
  int         nlong = 0;
  int         overruns = 0;
  initial txe_n = 1'b0;
  always @(negedge wr) begin
    if (txe_n) overruns++;
    bytes.push_back(data);
    #2 txe_n = 1'b1;
    if (($urandom % 100) < LONG_PCT) begin
      nlong++;
      repeat (50 + $urandom % 200) @(posedge clock);
    end else
      repeat (1 + $urandom % 3) @(posedge clock);
    #1 txe_n = 1'b0;
  end
endmodule
