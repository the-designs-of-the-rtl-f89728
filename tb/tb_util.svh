// tb_util.svh: shared self-checking helpers for the CCB testbenches.
// CHECK counts one check and reports a failure with a message;
// TB_FINISH prints the result line and ends the simulation.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s at %0t", msg, $time); end end
`define TB_FINISH begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(cycles) initial begin repeat (cycles) @(posedge clock); failures++; $display("FAIL: watchdog"); `TB_FINISH end
`endif
