// ccb_ereg: a WID-bit register with a synchronous input enable.
//
// The multi-bit form of ccb_elatch: d is loaded at a rising clock edge when
// ien is high, otherwise the contents are held.  clear resets it
// asynchronously.  Used wherever a value must be captured on a particular
// clock cycle (address register, EPP data registers, configuration snapshot).
module ccb_ereg #(
  parameter int WID = 8
) (
  input  logic           clock,
  input  logic           clear,
  input  logic           ien,
  input  logic [WID-1:0] d,
  output logic [WID-1:0] q
);
  always_ff @(posedge clock or posedge clear)
    if (clear)    q <= '0;
    else if (ien) q <= d;
endmodule
