// Shared testbench helpers: pass/fail counting, result line and watchdog.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH

// count one check; report it when it fails
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL @%0t: %s", $time, msg); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

// clock, and a watchdog that ends a hung simulation after N cycles
`define TB_CLOCK_AND_WATCHDOG(N) \
  logic clk = 1'b0; \
  always #5 clk = ~clk; \
  initial begin \
    repeat (N) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog expired after %0d cycles", N); \
    `TB_FINISH \
  end

`endif
