// Testbench of weight_source: the kernel address stream must replay
// w_base .. w_base+kw*kh-1 once per output group, on consecutive cycles,
// starting two cycles after start (in step with the activation source).
`include "tb_util.svh"
module tb_weight_source;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(200000)
  logic rst_n = 0, start = 0, rd_en;
  ce_cfg_t cfg;
  logic [WADDR_W-1:0] rd_addr;

  weight_source dut (.*);

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 25; run++) begin
      int n, total, taps, cyc;
      cfg = '0;
      cfg.kw = 10'(1 + $urandom % 12);
      cfg.kh = 6'(1 + $urandom % 3);
      cfg.n_og = 12'(1 + $urandom % 5);
      cfg.w_base = 10'($urandom % 600);
      taps = int'(cfg.kw) * int'(cfg.kh);
      total = taps * int'(cfg.n_og);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 0; cyc = 0;
      while (cyc < total + 5) begin
        if (rd_en) begin
          `CHECK(cyc == n + 1, "request not on consecutive cycles two cycles after start")
          `CHECK(rd_addr == WADDR_W'(int'(cfg.w_base) + n % taps), $sformatf("run %0d request %0d", run, n))
          n++;
        end
        @(negedge clk); cyc++;
      end
      `CHECK(n == total, $sformatf("run %0d: %0d requests instead of %0d", run, n, total))
    end
    `TB_FINISH
  end
endmodule
