// Shared testbench helpers: pass/fail counting, clock and watchdog.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(cond, msg) begin checks++; if (!(cond)) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end end
`define TB_CLOCK logic clk = 1'b0; always #5 clk = ~clk;
`define TB_WATCHDOG(cycles) initial begin repeat (cycles) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_END begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
