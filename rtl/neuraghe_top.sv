// neuraghe_top: the programmable-logic accelerators of the NEURAghe
// template, side by side.
//
//  - u_csp: the TCN-capable Convolution Specific Processor (12 x 4 SoP
//    matrix by default, the XC7Z020 configuration). Its register bus is
//    driven by the scheduling soft-core and its three off-chip ports
//    (activation DMA, weight DMA 1, weight DMA 2) go to the processing
//    system's high-performance ports; neither the soft-core nor the
//    processing system is part of this RTL, so these are top-level ports.
//  - u_mbconv: the engine specialised for depthwise-separable / MBConv
//    layers, which the template can host instead of the standard engine.
//  - u_sne: the spiking neural engine in its FPGA configuration (2 slices
//    of 16 clusters), likewise a design-time alternative engine.
// The three engines are independent: each has its own ports. In a real
// build one would choose one engine at design time; instantiating all of
// them here lets one top simulate and check every engine.
module neuraghe_top
  import neuraghe_pkg::*;
  import sne_pkg::*;
#(
  parameter int unsigned N_ROWS     = 4,
  parameter int unsigned N_COLS     = 12,
  parameter int unsigned MB_ROWS    = 12,
  parameter int unsigned MB_COLS    = 9,
  parameter int unsigned MB_KS      = 3,
  parameter int unsigned MB_CIN     = 16,
  parameter int unsigned SNE_SLICES = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ---- CSP ----
  input  reg_req_t             csp_reg_req,
  output logic [31:0]          csp_reg_rdata,
  output logic                 csp_irq,
  output ext_req_t [2:0]       csp_ext_req,
  input  ext_rsp_t [2:0]       csp_ext_rsp,
  // ---- MBConv engine ----
  input  logic [$clog2(MB_CIN+1)-1:0]                       mb_c_in,
  input  logic [2:0][4:0]                                   mb_qf,
  input  logic                                              mb_hist_clr,
  input  logic                                              mb_w_we,
  input  logic [1:0]                                        mb_w_phase,
  input  logic [$clog2(MB_ROWS)-1:0]                        mb_w_row,
  input  logic [$clog2((MB_CIN > MB_ROWS) ? MB_CIN : MB_ROWS)-1:0] mb_w_idx,
  input  logic signed [DATA_W-1:0]                          mb_w_data,
  input  logic                                              mb_in_valid,
  output logic                                              mb_in_ready,
  input  logic signed [MB_COLS-1:0][MB_CIN-1:0][DATA_W-1:0] mb_in_batch,
  output logic                                              mb_out_valid,
  input  logic                                              mb_out_ready,
  output logic signed [MB_COLS-1:0][MB_ROWS-1:0][DATA_W-1:0] mb_out_batch,
  // ---- spiking neural engine ----
  input  logic [SNE_SLICES-1:0] sne_slice_en,
  input  logic                  sne_cfg_we,
  input  logic                  sne_cfg_kernel,
  input  logic [((SNE_SLICES > 1) ? $clog2(SNE_SLICES) : 1)-1:0] sne_cfg_slice,
  input  logic [3:0]            sne_cfg_cluster,
  input  sne_ccfg_t             sne_cfg_data,
  input  logic [7:0]            sne_w_addr,
  input  logic [W_W-1:0]        sne_w_data,
  input  logic                  sne_ev_valid,
  output logic                  sne_ev_ready,
  input  sne_event_t            sne_ev,
  output logic                  sne_out_valid,
  input  logic                  sne_out_ready,
  output sne_event_t            sne_out_ev
);
  csp #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_csp (
    .clk, .rst_n, .reg_req(csp_reg_req), .reg_rdata(csp_reg_rdata), .irq(csp_irq),
    .ext_req(csp_ext_req), .ext_rsp(csp_ext_rsp)
  );

  mbconv_engine #(.N_ROWS(MB_ROWS), .N_COLS(MB_COLS), .KS(MB_KS), .C_IN_MAX(MB_CIN), .DW(DATA_W)) u_mbconv (
    .clk, .rst_n, .c_in(mb_c_in), .qf(mb_qf), .hist_clr(mb_hist_clr),
    .w_we(mb_w_we), .w_phase(mb_w_phase), .w_row(mb_w_row), .w_idx(mb_w_idx), .w_data(mb_w_data),
    .in_valid(mb_in_valid), .in_ready(mb_in_ready), .in_batch(mb_in_batch),
    .out_valid(mb_out_valid), .out_ready(mb_out_ready), .out_batch(mb_out_batch)
  );

  sne_engine #(.N_SLICES(SNE_SLICES), .N_CLUSTERS(16), .KS(3), .N_CH(16)) u_sne (
    .clk, .rst_n, .slice_en(sne_slice_en),
    .cfg_we(sne_cfg_we), .cfg_kernel(sne_cfg_kernel), .cfg_slice(sne_cfg_slice),
    .cfg_cluster(sne_cfg_cluster), .cfg_data(sne_cfg_data),
    .w_addr(sne_w_addr), .w_data(sne_w_data),
    .ev_valid(sne_ev_valid), .ev_ready(sne_ev_ready), .ev(sne_ev),
    .out_valid(sne_out_valid), .out_ready(sne_out_ready), .out_ev(sne_out_ev)
  );
endmodule
