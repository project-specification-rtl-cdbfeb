// tb_util.svh: check counting shared by the testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure and
// prints msg. FINISH prints the result line and ends the simulation.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL @%0t: %s", $time, msg); end end
`define FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog"); `FINISH end
`endif
