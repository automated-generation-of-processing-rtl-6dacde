// Check counters shared by the testbenches. A testbench declares
//   int checks = 0, failures = 0;
// and uses `CHECK(condition, message) for every comparison.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL @%0t: %s", $time, msg); \
    end \
  end
`endif
