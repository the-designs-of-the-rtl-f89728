// tb_slave_reader: a start with the buffer empty reads 128 words, the slave
// address walking 3, 2, 1, 0 in blocks of 32; a start while the buffer is
// busy is ignored; dump mode reads dsize+1 words from one slave; a full
// buffer ends the reading for that frame.
`timescale 1ns/1ps
`include "tb/tb_util.svh"
module tb_slave_reader;
  int checks = 0, failures = 0;
  logic clock = 0, reset = 1, start = 0, empty = 1, full = 0, dump = 0, read;
  logic [15:0] dsize = 0;
  logic [1:0] dslave = 0, slave;
  int nread, per_slave [4];
  always #5 clock = ~clock;
  slave_reader dut (.clock, .reset, .start, .empty, .full, .dump, .dsize, .dslave, .read, .slave);
  always @(posedge clock) if (read) begin
    if (!dump) `CHECK(slave == 2'(3 - nread / 32), "slave order");
    if (dump)  `CHECK(slave == dslave, "dump slave");
    nread++; per_slave[slave]++;
  end
  `TB_WATCHDOG(100000)
  task automatic go;
    nread = 0; foreach (per_slave[i]) per_slave[i] = 0;
    @(negedge clock); start = 1; @(negedge clock); start = 0; empty = 0;
  endtask
  initial begin
    repeat (2) @(posedge clock); #1 reset = 0;
    for (int r = 0; r < 5; r++) begin
      go;
      repeat (200) @(negedge clock);
      `CHECK(nread == 128, "128 words per frame")
      foreach (per_slave[i]) `CHECK(per_slave[i] == 32, "32 words per slave")
      // start while the buffer still holds data
      nread = 0;
      @(negedge clock); start = 1; @(negedge clock); start = 0;
      repeat (20) @(negedge clock);
      `CHECK(nread == 0, "start ignored while not empty")
      empty = 1;
    end
    dump = 1;
    for (int r = 0; r < 5; r++) begin
      dsize = 16'(10 + $urandom % 500); dslave = 2'($urandom);
      go;
      repeat (600) @(negedge clock);
      `CHECK(nread == dsize + 1, "dump reads dsize+1 words")
      empty = 1;
    end
    // full stops the reading
    dump = 0;
    go;
    repeat (40) @(negedge clock);
    full = 1;
    repeat (200) @(negedge clock);
    `CHECK(nread > 30 && nread < 45, "reading stopped by full")
    full = 0;
    repeat (200) @(negedge clock);
    `CHECK(nread < 45, "reading does not resume after full")
    `TB_FINISH
  end
endmodule
