// Shared testbench bookkeeping: check counters, a CHECK macro, the result
// line and a watchdog that ends a hung simulation with a failure.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(cond, msg) begin checks++; if (!(cond)) begin failures++; if (failures <= 10) $display("FAIL: %s", msg); end end
`define TB_FINISH begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(clkname, ncycles) initial begin repeat (ncycles) @(posedge clkname); failures++; $display("FAIL: watchdog"); `TB_FINISH end
`endif
