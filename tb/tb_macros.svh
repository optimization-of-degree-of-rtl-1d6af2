// Common testbench bookkeeping: a check counter, a failure counter, a compare macro
// and the final result line.
`ifndef TB_MACROS_SVH
`define TB_MACROS_SVH

`define TB_CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`endif
