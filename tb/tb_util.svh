// Shared testbench helpers: check counting and the final result line.
// A testbench that includes this file declares nothing else named
// `checks` or `failures`.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end

`define FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`endif
