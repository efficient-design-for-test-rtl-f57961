// Shared self-check macro for the unit testbenches: counts a check and,
// if the condition is false, a failure with a message.
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end end
