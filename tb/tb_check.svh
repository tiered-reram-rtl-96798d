// Shared checking macros for the testbenches: each CHECK counts one check and
// reports a failure with a message.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end end
`define TB_DONE \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
