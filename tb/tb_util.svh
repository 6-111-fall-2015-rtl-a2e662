// Shared check macro for the self-checking testbenches: counts a check and,
// if the condition is false, counts a failure and prints the message.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`endif
