// epp_handshaker: synchronises the EPP handshake to the FPGA clock.
//
// Latches 1 and 2 register the inverted data and address strobes.  Their OR,
// "active", one clock later gives a one-cycle strobe pulse (latch 3 masks the
// rest of the EPP strobe), so the other Control Gateway blocks act exactly
// once per EPP cycle, at the edge that ends the pulse.  isaddr (latch 2) and
// send (active & write_n, i.e. an EPP read) settle a cycle before strobe.
// Latch 4 produces wait_n by the truth table: strobe active -> 1; strobe idle
// and write_n low -> hold; strobe idle and write_n high -> 0.  wait_n rises
// one clock after the latches see the strobe, 1-2 clocks after the EPP strobe
// falls.  write_n is used unlatched since EPP keeps it stable around the strobe.
module epp_handshaker (
  input  logic clock,
  input  logic reset,
  input  logic data_strobe_n,
  input  logic addr_strobe_n,
  input  logic write_n,
  output logic wait_n,
  output logic strobe,
  output logic isaddr,
  output logic send
);
  logic dstb, astb, active, seen;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      dstb <= 1'b0; astb <= 1'b0; seen <= 1'b0; wait_n <= 1'b0;
    end else begin
      dstb   <= ~data_strobe_n;
      astb   <= ~addr_strobe_n;
      seen   <= active;
      wait_n <= active ? 1'b1 : (write_n ? 1'b0 : wait_n);
    end

  assign active = dstb | astb;
  assign strobe = active & ~seen;
  assign isaddr = astb;
  assign send   = active & write_n;
endmodule
