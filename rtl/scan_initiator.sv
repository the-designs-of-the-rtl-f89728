// scan_initiator: starts and stops scans.
//
// A write of start_scan_reg (start, its attn pulse) at once drops run_rx and
// run_acq, snapshots all configuration registers into a register bank
// (decoded into scan_regs), increments the 32-bit scan_id, and arms the scan.
// If the sync bit was written the scan then waits for the next 1PPS pulse,
// else it is synchronised at once.  After PREP_DELAY clocks, time for the
// Data Dispatcher to report that it is busy, run_rx rises as soon as the
// scan is synchronised and the Data Dispatcher is idle.  run_acq follows
// roundtrip_dt clocks later (the round-trip delay of the receiver controls).
// Both stay high until the next write of start_scan_reg.
module scan_initiator #(
  parameter int PREP_DELAY = 4
) (
  input  logic               clock,
  input  logic               reset,
  input  logic               start,
  input  logic               sync,
  input  logic [7:0]         config_regs [ccb_pkg::NREGS],
  input  logic               pps,
  input  logic               idle,
  output logic               run_rx,
  output logic               run_acq,
  output ccb_pkg::scan_cfg_t scan_regs,
  output logic [31:0]        scan_id
);
  import ccb_pkg::*;
  regfile_t   cfg_in, snap;
  logic [7:0] prep_cnt, rt_cnt;
  logic       armed, synced, go;

  always_comb
    for (int i = 0; i < NREGS; i++) cfg_in[i] = config_regs[i];

  ccb_ereg #(.WID($bits(regfile_t))) u_snap (.clock, .clear(reset), .ien(start), .d(cfg_in), .q(snap));
  assign scan_regs = decode_cfg(snap);

  ccb_event_counter #(.WID(32)) u_id (
    .clock, .clear(reset), .sload(1'b0), .up(start), .down(1'b0), .d('0), .count(scan_id));

  ccb_event_counter #(.WID(8)) u_prep (
    .clock, .clear(reset), .sload(start), .up(1'b0), .down(|prep_cnt), .d(8'(PREP_DELAY)),
    .count(prep_cnt));

  ccb_event_counter #(.WID(8)) u_rt (
    .clock, .clear(reset), .sload(start), .up(1'b0), .down(run_rx & (|rt_cnt)),
    .d(cfg_in[A_ROUNDTRIP]), .count(rt_cnt));

  assign go = armed & synced & (prep_cnt == '0) & idle;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      armed <= 1'b0; synced <= 1'b0; run_rx <= 1'b0;
    end else if (start) begin
      armed <= 1'b1; synced <= ~sync; run_rx <= 1'b0;
    end else begin
      if (armed && pps) synced <= 1'b1;
      if (go) begin armed <= 1'b0; run_rx <= 1'b1; end
    end

  assign run_acq = run_rx & (rt_cnt == '0);
endmodule
