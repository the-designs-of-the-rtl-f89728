// ccb_piso: parallel-in serial-out register of LEN words of WID bits.
//
// Unlike a conventional PISO it has separate load and shift enables and holds
// its contents when neither is asserted.  At a rising edge: load copies d[i]
// into node i (load wins over shift); shift alone moves node i+1 into node i
// and si into node LEN-1.  so is node 0, so d[0] is the first word out.
// Word d[i] occupies bits [i*WID +: WID] of d.  clear is asynchronous.
module ccb_piso #(
  parameter int LEN = 8,
  parameter int WID = 16
) (
  input  logic               clock,
  input  logic               clear,
  input  logic               load,
  input  logic               shift,
  input  logic [LEN*WID-1:0] d,
  input  logic [WID-1:0]     si,
  output logic [WID-1:0]     so
);
  logic [WID-1:0] node [LEN];

  always_ff @(posedge clock or posedge clear)
    if (clear) begin
      for (int i = 0; i < LEN; i++) node[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < LEN; i++) node[i] <= d[i*WID +: WID];
    end else if (shift) begin
      for (int i = 0; i < LEN-1; i++) node[i] <= node[i+1];
      node[LEN-1] <= si;
    end

  assign so = node[0];
endmodule
