// Shared testbench helpers: a pass/fail counter pair and the final report.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define CHECK_EQ(got, exp, msg) \
  begin checks++; if ((got) !== (exp)) begin failures++; \
    $display("FAIL: %s: got %0h expected %0h", msg, got, exp); end end
`define TB_REPORT \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
