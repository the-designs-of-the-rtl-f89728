// data_dispatcher: moves integrated or dump-mode data from the slaves to USB.
//
// A start pulse (accepted only when the previous frame has been sent) makes
// the slave_reader read words over the backplane bus, one per clock, into
// the frame_buffer, which sends the 8-word header then the words to the
// FT245 USB chip.  The slave_detector watches the bus heartbeat to fill the
// roster in the header.  idle is high when nothing is being collected or
// sent; usb_flush pulses for one clock when a frame has been fully sent, to
// make the USB chip send what it holds.
module data_dispatcher #(
  parameter int DEPTH = 1024
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              start,
  input  logic              dump,
  input  logic [15:0]       dsize,
  input  logic [1:0]        dslave,
  input  ccb_pkg::hdr_info_t info,
  input  logic [15:0]       bus_data,
  input  logic              bus_hb,
  output logic              read,
  output logic [1:0]        slave,
  output logic              idle,
  output logic [7:0]        usb_q,
  output logic              usb_wr,
  input  logic              usb_txe_n,
  output logic              usb_flush
);
  logic       empty, full, empty_d;
  logic [3:0] roster;

  slave_reader u_rd (.clock, .reset, .start, .empty, .full, .dump, .dsize, .dslave,
                     .read, .slave);
  slave_detector u_det (.clock, .reset, .slave, .read, .hb(bus_hb), .roster);
  frame_buffer #(.DEPTH(DEPTH)) u_fb (
    .clock, .reset, .read, .d(bus_data), .info, .roster, .dump, .full, .empty,
    .q(usb_q), .write(usb_wr), .txe_n(usb_txe_n));

  always_ff @(posedge clock or posedge reset)
    if (reset) empty_d <= 1'b1; else empty_d <= empty;

  assign idle      = empty & ~read;
  assign usb_flush = empty & ~empty_d;
endmodule
