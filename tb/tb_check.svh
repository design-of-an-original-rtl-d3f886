// Shared checking helpers for the testbenches: a check counter, a failure
// counter and a macro that compares a value with its expected value.
int checks = 0;
int failures = 0;
`define CHECK_EQ(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end
`define TB_END \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
