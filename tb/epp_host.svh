// epp_host.svh: tasks of an EPP (IEEE 1284) host for the CCB testbenches.
// A cycle sets write_n and the data, lowers the address or data strobe,
// waits for wait_n high (the device has taken or driven the byte), raises the
// strobe, returns write_n to its idle high level and waits for wait_n low.
// The including module declares clock, epp_dstb_n, epp_astb_n, epp_write_n,
// host_data (driven by the host), dev_data (driven by the device) and epp_wait_n.
`ifndef EPP_HOST_SVH
`define EPP_HOST_SVH
task automatic epp_cycle(input bit is_addr, input bit is_write, input logic [7:0] wdata,
                         output logic [7:0] rdata);
  @(negedge clock);
  epp_write_n = !is_write;
  host_data   = wdata;
  @(negedge clock);
  if (is_addr) epp_astb_n = 1'b0; else epp_dstb_n = 1'b0;
  while (!epp_wait_n) @(negedge clock);
  rdata = dev_data;
  epp_astb_n  = 1'b1;
  epp_dstb_n  = 1'b1;
  @(negedge clock);
  epp_write_n = 1'b1;
  while (epp_wait_n) @(negedge clock);
endtask
task automatic epp_write_reg(input logic [7:0] a, input logic [7:0] v);
  logic [7:0] dummy;
  epp_cycle(1, 1, a, dummy);
  epp_cycle(0, 1, v, dummy);
endtask
task automatic epp_read_reg(input logic [7:0] a, output logic [7:0] v);
  logic [7:0] dummy;
  epp_cycle(1, 1, a, dummy);
  epp_cycle(0, 0, 8'h00, v);
endtask
task automatic epp_read_mask(output logic [7:0] v);
  epp_cycle(1, 0, 8'h00, v);
endtask
`endif
