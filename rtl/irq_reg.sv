// irq_reg: interrupt-request register for one event source.
//
// A one-cycle intr pulse sets irq (ELatch2) at the next edge.  A one-cycle ack
// (EPP address read) copies irq into mask (ELatch1) and reloads irq from intr,
// so a request arriving together with the ack is kept for the next read.  A
// second request while irq is still set is merged, by design.
module irq_reg (
  input  logic clock,
  input  logic reset,
  input  logic intr,
  input  logic ack,
  output logic irq,
  output logic mask
);
  ccb_elatch u_l2 (.clock, .clear(reset), .ien(intr | ack), .d(intr), .q(irq),  .q_n());
  ccb_elatch u_l1 (.clock, .clear(reset), .ien(ack),        .d(irq),  .q(mask), .q_n());
endmodule
