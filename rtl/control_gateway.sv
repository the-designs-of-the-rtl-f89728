// control_gateway: the EPP parallel-port interface of the master FPGA.
//
// EPP address writes set the register address; data writes and reads go to
// the addressed 8-bit register; an address read returns, and clears, the
// interrupt mask.  The FPGA drives the EPP data lines only while send is high
// (epp_data_oe).  The register values and their one-cycle attn flags go to the
// State Generator, which also supplies the three interrupt requests and the
// hold-off interval.  Each EPP cycle takes 1-2 extra clocks for
// synchronisation (see epp_handshaker).
module control_gateway #(
  parameter int NREGS = 20
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [7:0]       epp_data_in,
  output logic [7:0]       epp_data_out,
  output logic             epp_data_oe,
  input  logic             data_strobe_n,
  input  logic             addr_strobe_n,
  input  logic             write_n,
  output logic             wait_n,
  output logic             intr,
  output logic [7:0]       regs [NREGS],
  output logic [NREGS-1:0] attn,
  input  logic             cal_intr,
  input  logic             int_intr,
  input  logic             sec_intr,
  input  logic [4:0]       holdoff
);
  logic       strobe, isaddr, send;
  logic [7:0] addr, d_out, mask;

  epp_handshaker u_hs (.clock, .reset, .data_strobe_n, .addr_strobe_n, .write_n,
                       .wait_n, .strobe, .isaddr, .send);
  epp_addr_reg u_addr (.clock, .reset, .a_in(epp_data_in), .strobe, .isaddr, .send, .a_out(addr));
  epp_reg_bank #(.NREGS(NREGS), .ABITS(5)) u_bank (
    .clock, .reset, .strobe, .isaddr, .send, .addr(addr[4:0]), .d_in(epp_data_in),
    .d_out, .regs, .attn);
  epp_interrupter u_irq (.clock, .reset, .cal_intr, .int_intr, .sec_intr,
                         .strobe, .isaddr, .send, .holdoff, .intr, .mask);

  assign epp_data_out = isaddr ? mask : d_out;
  assign epp_data_oe  = send;
endmodule
