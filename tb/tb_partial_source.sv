// Testbench of partial_source: read requests follow the issue strobes at
// base, base+4, base+8, ...; a new start reloads the base.
`include "tb_util.svh"
module tb_partial_source;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  logic rst_n = 0, start = 0, issue = 0, rd_en;
  logic [SADDR_W-1:0] base = '0, rd_addr;

  partial_source dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      int n;
      base = SADDR_W'($urandom % 4000);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 0;
      for (int i = 0; i < 40; i++) begin
        issue = 1'($urandom);
        #1;
        `CHECK(rd_en == issue, "rd_en follows issue")
        if (issue) begin
          `CHECK(rd_addr == SADDR_W'(int'(base) + 4 * n), $sformatf("run %0d group %0d", run, n))
          n++;
        end
        @(negedge clk);
      end
      issue = 0;
    end
    `TB_FINISH
  end
endmodule
