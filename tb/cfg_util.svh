// cfg_util.svh: builds a scan configuration for the controller testbenches.
`ifndef CFG_UTIL_SVH
`define CFG_UTIL_SVH
function automatic ccb_pkg::scan_cfg_t make_cfg(input int state_len, input int integ_len,
                                               input bit sw_a, input bit sw_b, input bit dmp,
                                               input bit tst, input int blank_dt);
  ccb_pkg::scan_cfg_t c;
  c = '0;
  c.state_len = 16'(state_len);
  c.integ_len = 16'(integ_len);
  c.flags.switch_a = sw_a;
  c.flags.switch_b = sw_b;
  c.flags.dump = dmp;
  c.flags.test = tst;
  c.blank_dt = 8'(blank_dt);
  c.diode_rise = 32'd7;
  c.diode_fall = 16'd5;
  c.dump_lim = 16'd99;
  c.dump_slave = 2'd1;
  c.dump_sampler = 2'd2;
  return c;
endfunction
// state of switch a and b in state k of a cycle, before the closed levels are applied
function automatic logic [1:0] gray_state(input int k, input bit sw_a, input bit sw_b);
  if (sw_a && sw_b) return {1'(k % 4 >= 2), 1'((k % 4 == 1) || (k % 4 == 2))};
  if (sw_a)         return {1'b0, 1'(k % 2)};
  if (sw_b)         return {1'(k % 2), 1'b0};
  return 2'b00;
endfunction
`endif
