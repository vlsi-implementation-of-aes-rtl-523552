// Shared testbench bookkeeping: check counters and a CHECK macro that counts
// a comparison and reports a mismatch.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`endif
