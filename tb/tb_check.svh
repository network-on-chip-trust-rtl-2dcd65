// Shared checking helpers for the testbenches: each testbench declares
// "int checks, failures;" and counts every comparison through CHECK.
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
