// Shared check macro for the WIMP51 testbenches: counts a check, and counts
// and reports a failure when the observed value differs from the expected.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end
`endif
