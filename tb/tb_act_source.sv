// Testbench of act_source: for random kernel sizes, dilations, strides and
// 2-D row steps, the stream of requests is compared with the reference
// loop nest; checks that a run issues exactly n_og*kh*kw requests on
// consecutive cycles (no bubbles) and flags first/last taps.
`include "tb_util.svh"
module tb_act_source;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(200000)
  logic rst_n = 0, start = 0, busy, rd_en, rd_first, rd_last, done_issue;
  ce_cfg_t cfg;
  logic [SADDR_W-1:0] rd_addr;
  logic [1:0] rd_stride;

  act_source dut (.*);

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 25; run++) begin
      int n, first_cyc, cyc;
      cfg = '0;
      cfg.kw = 10'(1 + $urandom % 9);
      cfg.kh = 6'((run % 3 == 0) ? 1 + $urandom % 3 : 1);
      cfg.dilation = 10'(1 + $urandom % 8);
      cfg.stride = 2'(1 + $urandom % 3);
      cfg.row_step = 13'(32 + $urandom % 64);
      cfg.n_og = 12'(1 + $urandom % 6);
      cfg.act_base = 13'($urandom % 512);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 0; cyc = 0; first_cyc = -1;
      while (n < int'(cfg.n_og) * int'(cfg.kh) * int'(cfg.kw) && cyc < 2000) begin
        if (rd_en) begin
          int og, ky, kx, t;
          t = n % (int'(cfg.kh) * int'(cfg.kw));
          og = n / (int'(cfg.kh) * int'(cfg.kw)); ky = t / int'(cfg.kw); kx = t % int'(cfg.kw);
          if (first_cyc < 0) first_cyc = cyc;
          `CHECK(cyc - first_cyc == n, "bubble in the request stream")
          `CHECK(rd_addr == SADDR_W'(int'(cfg.act_base) + og * 4 * int'(cfg.stride) + ky * int'(cfg.row_step) + kx * int'(cfg.dilation)),
                 $sformatf("run %0d request %0d address %0d", run, n, rd_addr))
          `CHECK(rd_stride == cfg.stride, "stride")
          `CHECK(rd_first == (t == 0), "first flag")
          `CHECK(rd_last == (t == int'(cfg.kh) * int'(cfg.kw) - 1), "last flag")
          if (n == int'(cfg.n_og) * int'(cfg.kh) * int'(cfg.kw) - 1) `CHECK(done_issue, "done_issue with the final request")
          n++;
        end
        @(negedge clk); cyc++;
      end
      `CHECK(!rd_en && !busy, "requests after the end of the run")
      `CHECK(first_cyc == 1, "first request not two cycles after start")
    end
    `TB_FINISH
  end
endmodule
