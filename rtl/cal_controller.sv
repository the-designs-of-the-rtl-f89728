// cal_controller: the queue of calibration-diode configurations.
//
// Each write of cal_diode_reg (cal_attn) pushes the byte {n[5:0], diode_b,
// diode_a} into a QDEPTH-entry FIFO (pushes to a full FIFO are dropped).  At
// each integration start (integ_start = start_tick | integ_tick) a 6-bit
// counter counts down, unless it is at 1 or 0; then the oldest entry is
// popped, if there is one: its n goes into the counter and its diode states
// into the two cal_switcher instances, which drive the diodes from then on.
// With an empty queue the diodes keep their states.  A request flag is set
// whenever the FIFO has room and is cleared for a clock by each cal_attn;
// cal_intr pulses once each time it rises.  The rising edge of prepare (the
// hold before a scan) clears the FIFO, the counter and the request, which
// then immediately asks for the first entry of the new scan.
module cal_controller #(
  parameter int QDEPTH = 16
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        prepare,
  input  logic [7:0]  cal_reg,
  input  logic        cal_attn,
  input  logic        integ_start,
  input  logic [31:0] rise_dt,
  input  logic [15:0] fall_dt,
  output logic [1:0]  cal,
  output logic        stable,
  output logic        cal_intr
);
  logic       prep_d, prep, full, empty, pop, req, req_d, le1;
  logic [7:0] head;
  logic [5:0] n;
  logic [1:0] stb;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin prep_d <= 1'b0; req <= 1'b0; req_d <= 1'b0; end
    else begin
      prep_d <= prepare;
      req    <= prep ? 1'b0 : cal_attn ? 1'b0 : (req | ~full);
      req_d  <= req;
    end
  assign prep     = prepare & ~prep_d;
  assign cal_intr = req & ~req_d;

  ccb_fifo #(.WID(8), .DEPTH(QDEPTH)) u_fifo (
    .clock, .reset, .clear(prep), .ien(cal_attn), .d(cal_reg), .oen(pop), .q(head),
    .full, .empty);

  assign le1 = (n <= 6'd1);
  assign pop = integ_start & le1 & ~empty & ~prep;

  ccb_event_counter #(.WID(6)) u_n (
    .clock, .clear(reset), .sload(pop | prep), .up(1'b0), .down(integ_start & ~le1),
    .d(prep ? 6'd0 : head[7:2]), .count(n));

  for (genvar i = 0; i < 2; i++) begin : g_sw
    cal_switcher u_sw (.clock, .reset, .load(pop), .update(integ_start), .pending(head[i]),
                       .rise_dt, .fall_dt, .actual(cal[i]), .stable(stb[i]));
  end
  assign stable = &stb;
endmodule
