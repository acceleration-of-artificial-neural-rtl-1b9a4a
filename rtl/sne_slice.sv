// sne_slice: one slice of the spiking neural engine: N_CLUSTERS = 16
// clusters working in parallel on the same input event stream.
//
// Every input event is broadcast to all clusters and accepted only when
// all of them are ready, so the clusters stay in step; each cluster holds
// a different tile / output channel of the layer (its own configuration
// and kernel memory). Output spikes of the clusters are merged into one
// output event stream by a round-robin arbiter. Configuration and kernel
// words are written per cluster through a simple write port (standing in
// for the engine's memory-mapped programming port).
// The document gives the slice / cluster hierarchy and the 16 clusters per
// slice; broadcast, lock-step acceptance and round-robin merging are this
// design's choices.
// Timing: an accepted spike takes KS*KS cycles, a time step 64 cycles plus
// output stalls; output events carry valid/ready.
module sne_slice
  import sne_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 16,
  parameter int unsigned KS         = 3,
  parameter int unsigned N_CH       = 16,
  localparam int unsigned CW        = $clog2(N_CLUSTERS),
  localparam int unsigned KAW       = $clog2(N_CH * KS * KS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               cfg_we,
  input  logic [CW-1:0]      cfg_cluster,
  input  sne_ccfg_t          cfg_data,
  input  logic               w_we,
  input  logic [CW-1:0]      w_cluster,
  input  logic [KAW-1:0]     w_addr,
  input  logic [W_W-1:0]     w_data,
  // events
  input  logic               ev_valid,
  output logic               ev_ready,
  input  sne_event_t         ev,
  output logic               out_valid,
  input  logic               out_ready,
  output sne_event_t         out_ev
);
  sne_ccfg_t  [N_CLUSTERS-1:0] ccfg;
  logic       [N_CLUSTERS-1:0] c_ready, c_ovalid, c_ordy;
  sne_event_t [N_CLUSTERS-1:0] c_oev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ccfg <= '0;
    else if (cfg_we) ccfg[cfg_cluster] <= cfg_data;
  end

  assign ev_ready = &c_ready;

  for (genvar i = 0; i < N_CLUSTERS; i++) begin : g_cl
    sne_cluster #(.KS(KS), .N_CH(N_CH)) u_cluster (
      .clk, .rst_n, .cfg(ccfg[i]),
      .w_we(w_we && w_cluster == CW'(i)), .w_addr, .w_data,
      .ev_valid(ev_valid && ev_ready), .ev_ready(c_ready[i]), .ev,
      .out_valid(c_ovalid[i]), .out_ready(c_ordy[i]), .out_ev(c_oev[i])
    );
  end

  // round-robin merge of the cluster outputs
  logic [CW-1:0] last, grant;
  logic          any;
  // search from the cluster after the last one served, wrapping around
  always_comb begin
    grant = last;
    for (int k = N_CLUSTERS; k >= 1; k--) begin
      if (c_ovalid[CW'((32'(last) + k) % N_CLUSTERS)]) grant = CW'((32'(last) + k) % N_CLUSTERS);
    end
  end
  assign any       = |c_ovalid;
  assign out_valid = any;
  assign out_ev    = c_oev[grant];
  always_comb begin
    c_ordy = '0;
    c_ordy[grant] = any && out_ready;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= CW'(N_CLUSTERS - 1);
    else if (any && out_ready) last <= grant;
  end
endmodule
