// Common checking helpers for the testbenches: a pass/fail counter pair,
// a CHECK macro and the final result line.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`endif
