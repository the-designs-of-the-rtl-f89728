// epp_addr_reg: holds the register address sent by an EPP address write.
//
// An 8-bit ccb_ereg loads the EPP data lines at the edge where the handshaker's
// strobe pulse marks an address write (strobe & isaddr & ~send).  a_out routes
// all later EPP data reads and writes.
module epp_addr_reg (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] a_in,
  input  logic       strobe,
  input  logic       isaddr,
  input  logic       send,
  output logic [7:0] a_out
);
  ccb_ereg #(.WID(8)) u_reg (
    .clock, .clear(reset), .ien(strobe & isaddr & ~send), .d(a_in), .q(a_out));
endmodule
