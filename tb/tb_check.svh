// Common self-check bookkeeping for the testbenches: counters, a CHECK
// macro that counts and reports a failing comparison, and the final line.
// Nothing here is specific to the design.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(cond, msg) begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_DONE begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog expired"); `TB_DONE end
`endif
