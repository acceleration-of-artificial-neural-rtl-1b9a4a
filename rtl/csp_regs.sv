// csp_regs: memory-mapped control and status registers of the CSP.
//
// The soft-core scheduler (middleware) programs every Convolution Engine
// run and every DMA transfer through these registers, then starts them and
// waits for their completion flags. The register map (word addresses, see
// neuraghe_pkg) is:
//   0x00 CE_CTRL  W bit0: start the engine   R bit0: engine busy
//   0x01 CE_KER   kw[9:0] kh[21:16]
//   0x02 CE_DS    dilation[9:0] stride[17:16]
//   0x03 CE_ROW   row_step     0x04 CE_NOG  number of output groups
//   0x05 CE_ABASE act_base     0x06 CE_WBASE w_base   0x07 CE_OBASE out_base
//   0x08 CE_MODE  acc_en[0] out_sel[1] qf[13:8]
//   0x09 STATUS   sticky done flags: [0] engine, [1+k] DMA k; write 1 to clear
//   0x10+4k DMA k: +0 ctrl (W bit0 start, bit1 dir; R bit0 busy),
//                  +1 off-chip byte address, +2 local word address, +3 words
// 'irq' is high while any done flag is set. The document says that the
// soft-core configures the engine through memory-mapped registers; the map
// itself is this design's. Writes take effect at the clock edge; read data
// are combinational from the address.
module csp_regs
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_DMA = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  reg_req_t                      req,
  output logic [31:0]                   rdata,
  output ce_cfg_t                       ce_cfg,
  output logic                          ce_start,
  input  logic                          ce_busy,
  input  logic                          ce_done,
  output logic [N_DMA-1:0]              dma_start,
  output logic [N_DMA-1:0]              dma_dir,
  output logic [N_DMA-1:0][EXT_AW-1:0]  dma_ext,
  output logic [N_DMA-1:0][LOC_AW-1:0]  dma_loc,
  output logic [N_DMA-1:0][15:0]        dma_len,
  input  logic [N_DMA-1:0]              dma_busy,
  input  logic [N_DMA-1:0]              dma_done,
  output logic                          irq
);
  logic [N_DMA:0] status;
  wire wr = req.valid && req.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_cfg <= '0; ce_start <= 1'b0; status <= '0;
      dma_start <= '0; dma_dir <= '0; dma_ext <= '0; dma_loc <= '0; dma_len <= '0;
    end else begin
      ce_start  <= 1'b0;
      dma_start <= '0;
      if (wr) begin
        unique case (req.addr)
          R_CE_CTRL:  ce_start <= req.wdata[0];
          R_CE_KER:   begin ce_cfg.kw <= req.wdata[9:0]; ce_cfg.kh <= req.wdata[21:16]; end
          R_CE_DS:    begin ce_cfg.dilation <= req.wdata[9:0]; ce_cfg.stride <= req.wdata[17:16]; end
          R_CE_ROW:   ce_cfg.row_step <= req.wdata[SADDR_W-1:0];
          R_CE_NOG:   ce_cfg.n_og     <= req.wdata[11:0];
          R_CE_ABASE: ce_cfg.act_base <= req.wdata[SADDR_W-1:0];
          R_CE_WBASE: ce_cfg.w_base   <= req.wdata[WADDR_W-1:0];
          R_CE_OBASE: ce_cfg.out_base <= req.wdata[SADDR_W-1:0];
          R_CE_MODE:  begin
            ce_cfg.acc_en <= req.wdata[0]; ce_cfg.out_sel <= req.wdata[1]; ce_cfg.qf <= req.wdata[13:8];
          end
          default: ;
        endcase
        for (int k = 0; k < N_DMA; k++) begin
          if (req.addr == R_DMA0 + 8'(4 * k)) begin
            dma_start[k] <= req.wdata[0]; dma_dir[k] <= req.wdata[1];
          end
          if (req.addr == R_DMA0 + 8'(4 * k + 1)) dma_ext[k] <= req.wdata;
          if (req.addr == R_DMA0 + 8'(4 * k + 2)) dma_loc[k] <= req.wdata[LOC_AW-1:0];
          if (req.addr == R_DMA0 + 8'(4 * k + 3)) dma_len[k] <= req.wdata[15:0];
        end
      end
      // sticky completion flags; a new completion wins over a clear
      if (wr && req.addr == R_STATUS) status <= status & ~req.wdata[N_DMA:0];
      if (ce_done) status[0] <= 1'b1;
      for (int k = 0; k < N_DMA; k++) if (dma_done[k]) status[k+1] <= 1'b1;
    end
  end

  always_comb begin
    rdata = '0;
    unique case (req.addr)
      R_CE_CTRL:  rdata[0] = ce_busy;
      R_CE_KER:   begin rdata[9:0] = ce_cfg.kw; rdata[21:16] = ce_cfg.kh; end
      R_CE_DS:    begin rdata[9:0] = ce_cfg.dilation; rdata[17:16] = ce_cfg.stride; end
      R_CE_ROW:   rdata[SADDR_W-1:0] = ce_cfg.row_step;
      R_CE_NOG:   rdata[11:0] = ce_cfg.n_og;
      R_CE_ABASE: rdata[SADDR_W-1:0] = ce_cfg.act_base;
      R_CE_WBASE: rdata[WADDR_W-1:0] = ce_cfg.w_base;
      R_CE_OBASE: rdata[SADDR_W-1:0] = ce_cfg.out_base;
      R_CE_MODE:  begin rdata[0] = ce_cfg.acc_en; rdata[1] = ce_cfg.out_sel; rdata[13:8] = ce_cfg.qf; end
      R_STATUS:   rdata[N_DMA:0] = status;
      default: ;
    endcase
    for (int k = 0; k < N_DMA; k++) begin
      if (req.addr == R_DMA0 + 8'(4 * k))     begin rdata = '0; rdata[0] = dma_busy[k]; rdata[1] = dma_dir[k]; end
      if (req.addr == R_DMA0 + 8'(4 * k + 1)) rdata = dma_ext[k];
      if (req.addr == R_DMA0 + 8'(4 * k + 2)) rdata = 32'(dma_loc[k]);
      if (req.addr == R_DMA0 + 8'(4 * k + 3)) rdata = 32'(dma_len[k]);
    end
  end

  assign irq = |status;
endmodule
