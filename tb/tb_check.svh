// Shared check macro for the self-checking testbenches: compares a value with
// its expected value, counts the check and reports a mismatch.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(got, exp, msg) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0d expected %0d (t=%0t)", msg, $signed(got), $signed(exp), $time); \
    end \
  end
`endif
