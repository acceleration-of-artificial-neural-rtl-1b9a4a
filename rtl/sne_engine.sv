// sne_engine: spiking neural engine in its FPGA configuration: N_SLICES
// slices of 16 clusters (1024 LIF neurons per slice) behind an event
// crossbar.
//
// The crossbar delivers each input event to the slices selected by
// slice_en (several slices can work on one event stream, each holding a
// different part of the layer) and accepts the event when every selected
// slice is ready. The output spike streams of the slices are merged with
// fixed priority to the lower slice index. Configuration and kernel words
// are addressed to one slice and cluster. The document gives the slice
// count of the FPGA port (2, scaled down from the 8 of the original
// engine), the 16 clusters per slice and the crossbar between streamers and
// slices; the routing rule and the merge are this design's. The streamers
// and the APB programming port are not modelled: events enter and leave as
// valid/ready streams and configuration is a plain write port.
module sne_engine
  import sne_pkg::*;
#(
  parameter int unsigned N_SLICES   = 2,
  parameter int unsigned N_CLUSTERS = 16,
  parameter int unsigned KS         = 3,
  parameter int unsigned N_CH       = 16,
  localparam int unsigned SW        = (N_SLICES > 1) ? $clog2(N_SLICES) : 1,
  localparam int unsigned CW        = $clog2(N_CLUSTERS),
  localparam int unsigned KAW       = $clog2(N_CH * KS * KS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_SLICES-1:0]  slice_en,
  input  logic                 cfg_we,
  input  logic                 cfg_kernel,      // 0: cluster config, 1: kernel word
  input  logic [SW-1:0]        cfg_slice,
  input  logic [CW-1:0]        cfg_cluster,
  input  sne_ccfg_t            cfg_data,
  input  logic [KAW-1:0]       w_addr,
  input  logic [W_W-1:0]       w_data,
  input  logic                 ev_valid,
  output logic                 ev_ready,
  input  sne_event_t           ev,
  output logic                 out_valid,
  input  logic                 out_ready,
  output sne_event_t           out_ev
);
  logic       [N_SLICES-1:0] s_ready, s_ovalid, s_ordy;
  sne_event_t [N_SLICES-1:0] s_oev;

  assign ev_ready = &(s_ready | ~slice_en);

  for (genvar s = 0; s < N_SLICES; s++) begin : g_slice
    wire sel = (cfg_slice == SW'(s));
    sne_slice #(.N_CLUSTERS(N_CLUSTERS), .KS(KS), .N_CH(N_CH)) u_slice (
      .clk, .rst_n,
      .cfg_we(cfg_we && !cfg_kernel && sel), .cfg_cluster, .cfg_data,
      .w_we(cfg_we && cfg_kernel && sel), .w_cluster(cfg_cluster), .w_addr, .w_data,
      .ev_valid(ev_valid && ev_ready && slice_en[s]), .ev_ready(s_ready[s]), .ev,
      .out_valid(s_ovalid[s]), .out_ready(s_ordy[s]), .out_ev(s_oev[s])
    );
  end

  // fixed-priority merge: grant the lowest slice with a pending spike
  logic [SW-1:0] grant;
  always_comb begin
    grant = '0;
    for (int s = N_SLICES - 1; s >= 0; s--) if (s_ovalid[s]) grant = SW'(s);
  end
  assign out_valid = |s_ovalid;
  assign out_ev    = s_oev[grant];
  always_comb begin
    s_ordy = '0;
    s_ordy[grant] = out_ready && out_valid;
  end
endmodule
