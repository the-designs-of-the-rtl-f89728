// ccb_fifo: synchronous first-word-fall-through FIFO.
//
// q always shows the oldest entry while empty is low.  A push (ien) is ignored
// when the FIFO is full and a pop (oen) when it is empty; both may happen in
// the same cycle.  clear empties it synchronously.  The storage is a plain
// array so that synthesis can map it to block RAM (the read is asynchronous,
// which suits distributed RAM; a block-RAM mapping would register the read
// address).  The design only says "a large 16-bit FIFO" and "FIFO1"; depth,
// flags and the fall-through output are this design's choices.
module ccb_fifo #(
  parameter int WID   = 16,
  parameter int DEPTH = 1024
) (
  input  logic           clock,
  input  logic           reset,
  input  logic           clear,
  input  logic           ien,
  input  logic [WID-1:0] d,
  input  logic           oen,
  output logic [WID-1:0] q,
  output logic           full,
  output logic           empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WID-1:0] mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [AW:0]    used;
  logic           push, pop;

  assign full  = (used == (AW+1)'(DEPTH));
  assign empty = (used == '0);
  assign push  = ien & ~full;
  assign pop   = oen & ~empty;
  assign q     = mem[rptr];

  always_ff @(posedge clock)
    if (push) mem[wptr] <= d;

  always_ff @(posedge clock or posedge reset)
    if (reset) begin
      wptr <= '0; rptr <= '0; used <= '0;
    end else if (clear) begin
      wptr <= '0; rptr <= '0; used <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      used <= used + (AW+1)'(push) - (AW+1)'(pop);
    end
endmodule
