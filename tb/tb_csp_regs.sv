// Testbench of csp_regs: random register writes and reads against a shadow
// copy of the register map, checking field packing into the engine and DMA
// configuration outputs, one-cycle start pulses, sticky completion bits
// cleared by writing ones, a completion winning over a simultaneous clear,
// and the interrupt line following the status bits.
`include "tb_util.svh"
module tb_csp_regs;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  localparam int ND = 3;

  logic rst_n = 0;
  reg_req_t req = '0;
  logic [31:0] rdata;
  ce_cfg_t ce_cfg;
  logic ce_start, ce_busy = 0, ce_done = 0, irq;
  logic [ND-1:0] dma_start, dma_dir, dma_busy = '0, dma_done = '0;
  logic [ND-1:0][EXT_AW-1:0] dma_ext;
  logic [ND-1:0][LOC_AW-1:0] dma_loc;
  logic [ND-1:0][15:0] dma_len;

  csp_regs #(.N_DMA(ND)) dut (.*);

  logic [31:0] shadow [256];
  logic [ND:0] st;

  function automatic logic [31:0] mask_of(int a);
    case (a)
      R_CE_KER:   return 32'h003f_03ff;
      R_CE_DS:    return 32'h0003_03ff;
      R_CE_ROW, R_CE_ABASE, R_CE_OBASE: return 32'h0000_1fff;
      R_CE_NOG:   return 32'h0000_0fff;
      R_CE_WBASE: return 32'h0000_03ff;
      R_CE_MODE:  return 32'h0000_3f03;
      default:
        for (int k = 0; k < ND; k++) begin
          if (a == R_DMA0 + 4 * k + 1) return 32'hffff_ffff;
          if (a == R_DMA0 + 4 * k + 2) return 32'h000f_ffff;
          if (a == R_DMA0 + 4 * k + 3) return 32'h0000_ffff;
        end
    endcase
    return 0;
  endfunction

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); req = '{valid: 1, we: 1, addr: 8'(a), wdata: d};
    @(negedge clk); req = '0;
  endtask

  int n_start_ce = 0, n_start_dma = 0, n_race = 0;
  initial begin
    int addrs[$];
    addrs = '{R_CE_KER, R_CE_DS, R_CE_ROW, R_CE_NOG, R_CE_ABASE, R_CE_WBASE, R_CE_OBASE, R_CE_MODE};
    for (int k = 0; k < ND; k++) for (int j = 1; j < 4; j++) addrs.push_back(R_DMA0 + 4 * k + j);
    foreach (shadow[i]) shadow[i] = 0;
    st = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int kind;
      kind = $urandom % 6;
      if (kind < 3) begin
        int a;
        logic [31:0] d;
        a = addrs[$urandom % addrs.size()];
        d = $urandom;
        wr(a, d);
        shadow[a] = d & mask_of(a);
      end else if (kind == 3) begin
        // start pulses
        int k;
        logic dr;
        k = $urandom % (ND + 1);
        dr = 1'($urandom);
        @(negedge clk);
        req = '{valid: 1, we: 1, addr: (k == ND) ? 8'(R_CE_CTRL) : 8'(R_DMA0 + 4 * k), wdata: {30'd0, dr, 1'b1}};
        @(negedge clk); req = '0;
        if (k == ND) begin `CHECK(ce_start && dma_start == 0, "CE start pulse missing") n_start_ce++; end
        else begin `CHECK(dma_start == (ND'(1) << k) && !ce_start && dma_dir[k] == dr, "DMA start pulse wrong") n_start_dma++; end
        @(negedge clk);
        `CHECK(!ce_start && dma_start == 0, "start longer than one cycle")
      end else if (kind == 4) begin
        // completions, possibly racing with a clear
        logic [ND:0] dn, clr;
        dn = ($urandom % 2) ? (ND+1)'($urandom) : '0;
        clr = (ND+1)'($urandom);
        @(negedge clk);
        ce_done = dn[0]; dma_done = dn[ND:1];
        if ($urandom % 2) begin req = '{valid: 1, we: 1, addr: 8'(R_STATUS), wdata: 32'(clr)}; if ((dn & clr) != 0) n_race++; end
        else clr = '0;
        @(negedge clk);
        ce_done = 0; dma_done = '0; req = '0;
        st = (st & ~clr) | dn;
      end else begin
        ce_busy = 1'($urandom); dma_busy = ND'($urandom);
      end
      // read back everything
      @(negedge clk);
      foreach (addrs[i]) begin
        req = '{valid: 1, we: 0, addr: 8'(addrs[i]), wdata: 0}; #1;
        `CHECK(rdata == shadow[addrs[i]], $sformatf("reg %0h reads %h, expected %h", addrs[i], rdata, shadow[addrs[i]]))
      end
      req.addr = 8'(R_STATUS); #1;
      `CHECK(rdata == 32'(st), $sformatf("status %h, expected %h", rdata, st))
      `CHECK(irq == (st != 0), "irq wrong")
      req.addr = 8'(R_CE_CTRL); #1;
      `CHECK(rdata == 32'(ce_busy), "CE busy bit wrong")
      for (int k = 0; k < ND; k++) begin
        req.addr = 8'(R_DMA0 + 4 * k); #1;
        `CHECK(rdata[0] == dma_busy[k], "DMA busy bit wrong")
      end
      req = '0;
      // configuration outputs
      `CHECK(ce_cfg.kw == shadow[R_CE_KER][9:0] && ce_cfg.kh == shadow[R_CE_KER][21:16], "kernel size fields")
      `CHECK(ce_cfg.dilation == shadow[R_CE_DS][9:0] && ce_cfg.stride == shadow[R_CE_DS][17:16], "dilation/stride fields")
      `CHECK(ce_cfg.row_step == shadow[R_CE_ROW][12:0] && ce_cfg.n_og == shadow[R_CE_NOG][11:0], "row step / groups")
      `CHECK(ce_cfg.act_base == shadow[R_CE_ABASE][12:0] && ce_cfg.w_base == shadow[R_CE_WBASE][9:0]
             && ce_cfg.out_base == shadow[R_CE_OBASE][12:0], "base addresses")
      `CHECK(ce_cfg.acc_en == shadow[R_CE_MODE][0] && ce_cfg.out_sel == shadow[R_CE_MODE][1]
             && ce_cfg.qf == shadow[R_CE_MODE][13:8], "mode fields")
      for (int k = 0; k < ND; k++)
        `CHECK(dma_ext[k] == shadow[R_DMA0 + 4 * k + 1] && 32'(dma_loc[k]) == shadow[R_DMA0 + 4 * k + 2]
               && 32'(dma_len[k]) == shadow[R_DMA0 + 4 * k + 3], $sformatf("DMA %0d fields", k))
    end
    `CHECK(n_start_ce > 0 && n_start_dma > 0 && n_race > 0, $sformatf("a mechanism was never exercised: %0d %0d %0d", n_start_ce, n_start_dma, n_race))
    `TB_FINISH
  end
endmodule
