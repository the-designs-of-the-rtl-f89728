// slave_detector: one heartbeat_detector per slave; roster bit i = slave i alive.
//
// The slave address is decoded, and a detector is enabled only while its slave
// is being read (the bus heartbeat is only driven then).
module slave_detector (
  input  logic       clock,
  input  logic       reset,
  input  logic [1:0] slave,
  input  logic       read,
  input  logic       hb,
  output logic [3:0] roster
);
  for (genvar i = 0; i < 4; i++) begin : g_det
    heartbeat_detector u_det (.clock, .reset, .select(read && slave == 2'(i)), .hb,
                              .alive(roster[i]));
  end
endmodule
