// epp_reg_bank: the bank of EPP data registers.
//
// An EPP data write (strobe & ~isaddr & ~send) is demultiplexed by the low
// ABITS of the address register to the load input of one epp_data_reg.  d_out
// returns the addressed register for EPP data reads (0 past the last
// register).  All register values and attn flags are outputs for the State
// Generator.  NREGS = 20 covers the register list; five address bits decode it.
module epp_reg_bank #(
  parameter int NREGS = 20,
  parameter int ABITS = 5
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             strobe,
  input  logic             isaddr,
  input  logic             send,
  input  logic [ABITS-1:0] addr,
  input  logic [7:0]       d_in,
  output logic [7:0]       d_out,
  output logic [7:0]       regs [NREGS],
  output logic [NREGS-1:0] attn
);
  logic wr;
  assign wr = strobe & ~isaddr & ~send;

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    epp_data_reg u_reg (
      .clock, .reset, .load(wr && (addr == ABITS'(i))), .d(d_in), .q(regs[i]), .attn(attn[i]));
  end

  always_comb begin
    d_out = '0;
    for (int i = 0; i < NREGS; i++)
      if (addr == ABITS'(i)) d_out = regs[i];
  end
endmodule
