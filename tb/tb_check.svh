// Shared bookkeeping of the self-checking testbenches: a check counter, a
// failure counter, CHECK(cond, text), and the closing line.
int checks = 0;
int failures = 0;
`define CHECK(c, msg) begin checks++; if (!(c)) begin failures++; $display("FAIL: %s (%s:%0d)", msg, `__FILE__, `__LINE__); end end
`define TB_END begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(t) initial begin #(t); failures++; $display("FAIL: watchdog"); `TB_END end
