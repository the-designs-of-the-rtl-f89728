// frame_buffer: buffers one frame and streams it, header first, to USB.
//
// Words read from the slaves enter a DEPTH x 16 FIFO while read is high.  The
// first cycle of read (a one-cycle pulse formed from read and its delayed
// copy) loads the frame header and presets the byte streamer's word count.
// The byte streamer's shift pops the FIFO and shifts the header PISO at once,
// so FIFO words flow through the PISO behind the header.  empty tells the
// slave reader that the frame is gone; full stops the read.  Words dropped at
// a full FIFO are not counted.
module frame_buffer #(
  parameter int DEPTH = 1024
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              read,
  input  logic [15:0]       d,
  input  ccb_pkg::hdr_info_t info,
  input  logic [3:0]        roster,
  input  logic              dump,
  output logic              full,
  output logic              empty,
  output logic [7:0]        q,
  output logic              write,
  input  logic              txe_n
);
  logic        read_n_d, frame, shift, fifo_empty;
  logic [15:0] fifo_q, hdr_so;

  ccb_elatch u_l1 (.clock, .clear(reset), .ien(1'b1), .d(read), .q(), .q_n(read_n_d));
  assign frame = read & read_n_d;

  ccb_fifo #(.WID(16), .DEPTH(DEPTH)) u_fifo (
    .clock, .reset, .clear(1'b0), .ien(read), .d, .oen(shift), .q(fifo_q),
    .full, .empty(fifo_empty));

  frame_header u_hdr (.clock, .reset, .load(frame), .shift, .si(fifo_q), .so(hdr_so),
                      .info, .roster, .dump);

  byte_streamer #(.NHEADER(8)) u_bs (
    .clock, .reset, .load(frame), .read(read & ~full), .d(hdr_so), .shift, .q, .write,
    .txe_n, .empty);
endmodule
