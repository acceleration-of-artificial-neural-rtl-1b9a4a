// Testbench of output_sink: writes follow in_valid at base, base+4, ...
// and the group count tracks the writes; start reloads base and count.
`include "tb_util.svh"
module tb_output_sink;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  logic rst_n = 0, start = 0, in_valid = 0, wr_en;
  logic [SADDR_W-1:0] base = '0, wr_addr;
  logic [11:0] count;

  output_sink dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      int n;
      base = SADDR_W'($urandom % 4000);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 0;
      for (int i = 0; i < 40; i++) begin
        in_valid = 1'($urandom);
        #1;
        `CHECK(wr_en == in_valid, "wr_en follows in_valid")
        `CHECK(count == 12'(n), "group count")
        if (in_valid) begin
          `CHECK(wr_addr == SADDR_W'(int'(base) + 4 * n), $sformatf("run %0d group %0d", run, n))
          n++;
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    `TB_FINISH
  end
endmodule
