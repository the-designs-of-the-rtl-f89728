// slave_reader: collects one frame of words from the slaves over the bus.
//
// A start pulse is accepted only while the frame buffer is empty (the previous
// frame fully sent); otherwise the frame is dropped.  An accepted start loads
// a 16-bit down-counter with 127 (integration mode: 32 words from each of 4
// slaves) or with dsize (dump mode) and raises read at the next edge.  read
// stays high while the counter runs down to 0 and for the cycle at 0, i.e.
// count+1 words, or until full is seen.  The slave address is count[6:5] in
// integration mode (slave 3 first, 32 words each) and dslave in dump mode.
module slave_reader (
  input  logic        clock,
  input  logic        reset,
  input  logic        start,
  input  logic        empty,
  input  logic        full,
  input  logic        dump,
  input  logic [15:0] dsize,
  input  logic [1:0]  dslave,
  output logic        read,
  output logic [1:0]  slave
);
  logic        go, nz;
  logic [15:0] count;

  assign go = start & empty;
  assign nz = |count;

  ccb_event_counter #(.WID(16)) u_cnt (
    .clock, .clear(reset), .sload(go), .up(1'b0), .down(read & nz),
    .d(dump ? dsize : 16'd127), .count);

  always_ff @(posedge clock or posedge reset)
    if (reset) read <= 1'b0;
    else       read <= go | (read & ~full & nz);

  assign slave = dump ? dslave : count[6:5];
endmodule
