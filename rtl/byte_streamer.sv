// byte_streamer: sends 16-bit words to the FT245 USB FIFO chip as byte pairs.
//
// A 16-bit event counter holds the number of words still to be sent: load
// presets it to NHEADER (the header words), read counts each word entering
// the frame FIFO up (a word read on the load cycle is included in the
// preset), shift counts each word sent down; empty is count == 0.
// TXE# from the USB chip is synchronised by a rising-edge flop then a
// falling-edge flop.  When words remain and TXE# is low, a byte (low half
// first, chosen by a 1-bit byte counter) is registered onto q and write is
// raised at the same edge; write falls at the next edge, so the data are
// stable a full clock before and after the falling (active) edge of WR.  One
// idle clock follows so the synchronised TXE# reflects the write.  After the
// high byte, shift is pulsed for one clock to fetch the next word on d.
// Best case: one byte per 3 clocks.
module byte_streamer #(
  parameter int NHEADER = 8
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        load,
  input  logic        read,
  input  logic [15:0] d,
  output logic        shift,
  output logic [7:0]  q,
  output logic        write,
  input  logic        txe_n,
  output logic        empty
);
  typedef enum logic [1:0] {S_IDLE, S_WR, S_GAP} st_t;
  st_t         st;
  logic        txe1, txe2, half;
  logic [15:0] count;

  always_ff @(posedge clock or posedge reset)
    if (reset) txe1 <= 1'b1; else txe1 <= txe_n;
  always_ff @(negedge clock or posedge reset)
    if (reset) txe2 <= 1'b1; else txe2 <= txe1;

  ccb_event_counter #(.WID(16)) u_cnt (
    .clock, .clear(reset), .sload(load), .up(read), .down(shift),
    .d(16'(NHEADER) + 16'(read)), .count);
  assign empty = (count == '0);

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      st <= S_IDLE; half <= 1'b0; write <= 1'b0; shift <= 1'b0; q <= '0;
    end else begin
      shift <= 1'b0;
      unique case (st)
        S_IDLE: if (load) half <= 1'b0;
                else if (!empty && !txe2) begin
                  q     <= half ? d[15:8] : d[7:0];
                  write <= 1'b1;
                  st    <= S_WR;
                end
        S_WR:   begin
                  write <= 1'b0;
                  half  <= ~half;
                  shift <= half;
                  st    <= S_GAP;
                end
        default: st <= S_IDLE;
      endcase
    end
endmodule
