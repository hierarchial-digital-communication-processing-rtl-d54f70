// Shared check and watchdog helpers for the testbenches.
// CHK counts one check and reports a failure with its message.
`define CHK(c, m) begin checks++; if (!(c)) begin failures++; $display("FAIL %0t: %s", $time, m); end end
// WATCHDOG ends the simulation as failed if it has not finished after n clock periods.
`define WATCHDOG(n) initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define DONE begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
