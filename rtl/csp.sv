// csp: the Convolution Specific Processor, TCN-capable version.
//
// Holds the on-chip memory regions, the Convolution Engine, three DMA
// units and the control registers:
//   - activation memory region: one 8-bank interleaved memory per engine
//     column (input features);
//   - output memory region: two 8-bank sections per engine row, holding
//     results and the partial results of earlier runs;
//   - weight memory region: one bank per SoP unit;
//   - an activation DMA (unit 0) serving the activation and output regions
//     and two weight DMAs (units 1 and 2) sharing the weight loads; weight
//     DMA 1 writes the banks of the upper half of the rows, weight DMA 2
//     those of the lower half;
//   - the register file the soft-core scheduler uses to program all of it.
// Every memory is dual-ported: the engine uses one port and the DMAs the
// other, so transfers for the next step overlap the current computation
// (double buffering by address: the firmware places the next step's data
// in a different part of each memory).
//
// DMA local word address map: [19:16] region, then
//   region 0 (activation): [15:11] column, [10:0] word
//   region 1/2 (output section 0/1): [15:11] row, [10:0] word
//   region 3 (weights): [15:8] SoP index row*N_COLS+column, [7:0] word
// The soft-core (RISC-V), its memories and the processing system are not
// part of this module: the register bus and the three off-chip ports are
// its boundary. The document gives the memory organisation, the two weight
// DMAs and the engine; the address maps, register map and the split of
// banks between the two weight DMAs are this design's choices.
module csp
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_ROWS = 4,
  parameter int unsigned N_COLS = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_req_t         reg_req,
  output logic [31:0]      reg_rdata,
  output logic             irq,
  output ext_req_t [2:0]   ext_req,
  input  ext_rsp_t [2:0]   ext_rsp
);
  localparam int unsigned H = (N_ROWS + 1) / 2;   // rows loaded by weight DMA 1

  // ---------------- registers ----------------
  ce_cfg_t                 ce_cfg;
  logic                    ce_start, ce_busy, ce_done;
  logic [2:0]              dma_start, dma_dir, dma_busy, dma_done;
  logic [2:0][EXT_AW-1:0]  dma_ext;
  logic [2:0][LOC_AW-1:0]  dma_loc;
  logic [2:0][15:0]        dma_len;

  csp_regs #(.N_DMA(3)) u_regs (
    .clk, .rst_n, .req(reg_req), .rdata(reg_rdata),
    .ce_cfg, .ce_start, .ce_busy, .ce_done,
    .dma_start, .dma_dir, .dma_ext, .dma_loc, .dma_len, .dma_busy, .dma_done, .irq
  );

  // ---------------- DMAs ----------------
  loc_req_t [2:0]              loc_req;
  logic     [2:0][EXT_DW-1:0]  loc_rdata;
  for (genvar k = 0; k < 3; k++) begin : g_dma
    dma_engine u_dma (
      .clk, .rst_n, .start(dma_start[k]), .dir(dma_dir[k]),
      .ext_addr(dma_ext[k]), .loc_addr(dma_loc[k]), .len(dma_len[k]),
      .busy(dma_busy[k]), .done(dma_done[k]),
      .ext_req(ext_req[k]), .ext_rsp(ext_rsp[k]),
      .loc_req(loc_req[k]), .loc_rdata(loc_rdata[k])
    );
  end

  // ---------------- engine ----------------
  logic                              act_en, w_en, ps_en, ps_sec, out_we, out_sec;
  logic [SADDR_W-1:0]                act_addr, ps_addr, out_addr;
  logic [1:0]                        act_stride;
  logic [WADDR_W-1:0]                w_addr;
  quad_t   [N_COLS-1:0]              act_rdata;
  sample_t [N_ROWS-1:0][N_COLS-1:0]  w_rdata;
  quad_t   [N_ROWS-1:0]              ps_rdata, out_wdata;

  conv_engine #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_ce (
    .clk, .rst_n, .start(ce_start), .cfg(ce_cfg), .busy(ce_busy), .done(ce_done),
    .act_en, .act_addr, .act_stride, .act_rdata,
    .w_en, .w_addr, .w_rdata,
    .ps_en, .ps_addr, .ps_sec, .ps_rdata,
    .out_we, .out_addr, .out_sec, .out_wdata
  );

  // ---------------- activation DMA decode ----------------
  wire [3:0]         a_region = loc_req[0].addr[19:16];
  wire [4:0]         a_idx    = loc_req[0].addr[15:11];
  wire [WORD_AW-1:0] a_word   = loc_req[0].addr[WORD_AW-1:0];
  logic [3:0]        a_region_q;
  logic [4:0]        a_idx_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_region_q <= '0; a_idx_q <= '0;
    end else if (loc_req[0].en) begin
      a_region_q <= a_region; a_idx_q <= a_idx;
    end
  end

  // ---------------- activation memories ----------------
  quad_t [N_COLS-1:0] act_a_rdata;
  for (genvar c = 0; c < N_COLS; c++) begin : g_act
    wire sel = loc_req[0].en && a_region == REG_ACT && a_idx == 5'(c);
    banked_mem #(.NBANK(NBANK), .DEPTH(BANK_DEPTH), .LANES(LANES), .W(DATA_W)) u_mem (
      .clk,
      .a_en(sel), .a_we(sel && loc_req[0].we), .a_addr(a_word),
      .a_wdata(loc_req[0].wdata), .a_rdata(act_a_rdata[c]),
      .b_en(act_en), .b_we(1'b0), .b_addr(act_addr), .b_stride(act_stride),
      .b_wdata('0), .b_rdata(act_rdata[c])
    );
  end

  // ---------------- output memories (two sections per row) ----------------
  quad_t [N_ROWS-1:0][1:0] out_a_rdata, out_b_rdata;
  logic ps_sec_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ps_sec_q <= 1'b0;
    else if (ps_en) ps_sec_q <= ps_sec;
  end
  for (genvar r = 0; r < N_ROWS; r++) begin : g_out
    for (genvar s = 0; s < 2; s++) begin : g_sec
      wire sel = loc_req[0].en && a_region == (s == 0 ? REG_OUT0 : REG_OUT1) && a_idx == 5'(r);
      wire wr  = out_we && (out_sec == 1'(s));
      wire rd  = ps_en && (ps_sec == 1'(s));
      banked_mem #(.NBANK(NBANK), .DEPTH(BANK_DEPTH), .LANES(LANES), .W(DATA_W)) u_mem (
        .clk,
        .a_en(sel), .a_we(sel && loc_req[0].we), .a_addr(a_word),
        .a_wdata(loc_req[0].wdata), .a_rdata(out_a_rdata[r][s]),
        .b_en(wr || rd), .b_we(wr), .b_addr(wr ? out_addr : ps_addr), .b_stride(2'd1),
        .b_wdata(out_wdata[r]), .b_rdata(out_b_rdata[r][s])
      );
    end
    assign ps_rdata[r] = out_b_rdata[r][ps_sec_q];
  end

  always_comb begin
    loc_rdata[0] = '0;
    unique case (a_region_q)
      REG_ACT:  for (int c = 0; c < N_COLS; c++) if (a_idx_q == 5'(c)) loc_rdata[0] = act_a_rdata[c];
      REG_OUT0: for (int r = 0; r < N_ROWS; r++) if (a_idx_q == 5'(r)) loc_rdata[0] = out_a_rdata[r][0];
      REG_OUT1: for (int r = 0; r < N_ROWS; r++) if (a_idx_q == 5'(r)) loc_rdata[0] = out_a_rdata[r][1];
      default: ;
    endcase
  end

  // ---------------- weight banks ----------------
  // Weight banks are write-only from the DMAs.
  assign loc_rdata[1] = '0;
  assign loc_rdata[2] = '0;
  for (genvar r = 0; r < N_ROWS; r++) begin : g_wr
    for (genvar c = 0; c < N_COLS; c++) begin : g_wc
      localparam int unsigned K = (r < H) ? 1 : 2;   // weight DMA serving this row
      wire sel = loc_req[K].en && loc_req[K].we && loc_req[K].addr[19:16] == REG_WGT
                 && loc_req[K].addr[15:8] == 8'(r * N_COLS + c);
      weight_bank #(.DEPTH(BANK_DEPTH), .W(DATA_W), .WPW(LANES)) u_wb (
        .clk,
        .a_we(sel), .a_addr(loc_req[K].addr[WWORD_AW-1:0]), .a_wdata(loc_req[K].wdata),
        .b_en(w_en), .b_addr(w_addr), .b_rdata(w_rdata[r][c])
      );
    end
  end

  // weight DMA k may only address the rows it serves
  a_wdma1_rows : assert property (@(posedge clk) disable iff (!rst_n)
    loc_req[1].en |-> loc_req[1].addr[19:16] == REG_WGT && loc_req[1].addr[15:8] < 8'(H * N_COLS))
    else $error("csp: weight DMA 1 addressed a bank outside its rows");
  a_wdma2_rows : assert property (@(posedge clk) disable iff (!rst_n)
    loc_req[2].en |-> loc_req[2].addr[19:16] == REG_WGT && loc_req[2].addr[15:8] >= 8'(H * N_COLS)
                      && loc_req[2].addr[15:8] < 8'(N_ROWS * N_COLS))
    else $error("csp: weight DMA 2 addressed a bank outside its rows");
endmodule
