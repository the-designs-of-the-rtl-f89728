// epp_interrupter: shares the parallel-port interrupt among three sources.
//
// Each source (cal_intr, int_intr, sec_intr) has an irq_reg.  An EPP address
// read (strobe & isaddr & send) acknowledges: pending requests move to the
// 8-bit mask {5'b0, sec, int, cal} returned to the CPU, and are cleared.
// When any request is pending and the 13-bit hold-off counter is at zero, intr
// is raised for two clocks and the counter is loaded with {holdoff, 8'hFF}, so
// interrupts, including re-sends of unacknowledged ones, are at least
// (holdoff+1) x 256 clocks apart (25.6 us steps at 10 MHz).
module epp_interrupter (
  input  logic       clock,
  input  logic       reset,
  input  logic       cal_intr,
  input  logic       int_intr,
  input  logic       sec_intr,
  input  logic       strobe,
  input  logic       isaddr,
  input  logic       send,
  input  logic [4:0] holdoff,
  output logic       intr,
  output logic [7:0] mask
);
  logic [2:0]  irq, msk, req;
  logic        ack, fire, borrow, l1, l2;
  logic [12:0] hcount;

  assign ack = strobe & isaddr & send;
  assign req = {sec_intr, int_intr, cal_intr};

  for (genvar i = 0; i < 3; i++) begin : g_irq
    irq_reg u_irq (.clock, .reset, .intr(req[i]), .ack, .irq(irq[i]), .mask(msk[i]));
  end

  assign borrow = (hcount == '0);
  assign fire   = (|irq) & borrow;

  ccb_event_counter #(.WID(13)) u_hold (
    .clock, .clear(reset), .sload(fire), .up(1'b0), .down(~borrow),
    .d({holdoff, 8'hFF}), .count(hcount));

  always_ff @(posedge clock or posedge reset)
    if (reset) begin l1 <= 1'b0; l2 <= 1'b0; end
    else begin l1 <= fire; l2 <= l1; end

  assign intr = l1 | l2;
  assign mask = {5'b0, msk};
endmodule
