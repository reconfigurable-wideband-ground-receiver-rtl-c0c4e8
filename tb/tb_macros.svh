// Shared testbench helpers: a checked comparison, the result line and a
// watchdog. Each testbench declares `int checks, failures` and a clock `clk`.
`ifndef TB_MACROS_SVH
`define TB_MACROS_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; if (failures <= 10) $display("FAIL @%0t: %s", $time, msg); end end
`define TB_DONE \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(ncyc) \
  initial begin repeat (ncyc) @(posedge clk); failures++; $display("FAIL: watchdog expired"); `TB_DONE end
`endif
