// epp_data_reg: one 8-bit EPP register with an attention flag.
//
// When load is high at a rising edge the register takes d and attn is high for
// the following clock cycle, telling the State Generator the register changed.
module epp_data_reg (
  input  logic       clock,
  input  logic       reset,
  input  logic       load,
  input  logic [7:0] d,
  output logic [7:0] q,
  output logic       attn
);
  ccb_ereg #(.WID(8)) u_reg (.clock, .clear(reset), .ien(load), .d, .q);
  ccb_elatch u_attn (.clock, .clear(reset), .ien(1'b1), .d(load), .q(attn), .q_n());
endmodule
