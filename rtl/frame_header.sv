// frame_header: eight-word PISO holding the header of a data frame.
//
// load fills the words, sent in this order: 1 (integration) or 3 (dump); a
// status word {8'b0, cal[1:0], stable, test, roster[3:0]}; the integration
// number, the scan number and the time stamp, each as low then high 16 bits.
// Each shift outputs the next word and takes si (the frame FIFO's head) in at
// the far end, so the sample data follow the header through the same PISO.
module frame_header (
  input  logic              clock,
  input  logic              reset,
  input  logic              load,
  input  logic              shift,
  input  logic [15:0]       si,
  output logic [15:0]       so,
  input  ccb_pkg::hdr_info_t info,
  input  logic [3:0]        roster,
  input  logic              dump
);
  logic [15:0] w [8];
  assign w[0] = {14'd0, dump, 1'b1};
  assign w[1] = {8'd0, info.cal, info.stable, info.test, roster};
  assign w[2] = info.integ_id[15:0];
  assign w[3] = info.integ_id[31:16];
  assign w[4] = info.scan_id[15:0];
  assign w[5] = info.scan_id[31:16];
  assign w[6] = info.time_stamp[15:0];
  assign w[7] = info.time_stamp[31:16];

  ccb_piso #(.LEN(8), .WID(16)) u_piso (
    .clock, .clear(reset), .load, .shift,
    .d({w[7], w[6], w[5], w[4], w[3], w[2], w[1], w[0]}), .si, .so);
endmodule
