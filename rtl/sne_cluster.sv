// sne_cluster: one cluster of the spiking neural engine, a single
// leaky-integrate-and-fire (LIF) neuron datapath shared in time by
// N_NEUR = 64 neurons whose 8-bit membrane potentials sit in a local state
// memory.
//
// The neurons form an 8 x 8 tile of one output channel of a convolutional
// spiking layer, with a KS x KS kernel of signed 4-bit weights per input
// channel held in the cluster's kernel memory. Two kinds of input event:
//  - OP_SPIKE (x, y, ch): the spike reaches the output positions
//    (x - kx + PAD, y - ky + PAD) for every kernel tap (kx, ky); for each
//    of them that falls in this cluster's tile, the state is updated
//    V += W[ch][ky][kx] (saturating). One tap per cycle: KS*KS cycles.
//  - OP_TSTEP (t): every neuron leaks, V -= L (saturating), and fires if
//    V >= Vth: it emits an output spike event (its position, time t, the
//    cluster's output channel) and its state is reset to 0. One neuron per
//    cycle: N_NEUR cycles, plus a stall whenever the output is not ready.
// The document gives the LIF model (leak subtracted every time step,
// Heaviside firing against a threshold), the 64 8-bit states, 4-bit
// weights and the one-update-per-cycle datapath; the tile mapping, kernel
// addressing, saturation and reset-to-zero after a spike are this design's.
// The document's update equation is read as V[t+1] = V[t] - L + sum(W*S).
// Interface: ev_valid/ev_ready in, out_valid/out_ready out; the kernel
// memory is written through w_we/w_addr/w_data ({ch, ky, kx} row-major).
module sne_cluster
  import sne_pkg::*;
#(
  parameter int unsigned N_NEUR = 64,
  parameter int unsigned KS     = 3,
  parameter int unsigned N_CH   = 16,
  localparam int unsigned TW    = $clog2(N_NEUR) / 2,      // 3: tile is 8 x 8
  localparam int unsigned KAW   = $clog2(N_CH * KS * KS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sne_ccfg_t          cfg,
  input  logic               w_we,
  input  logic [KAW-1:0]     w_addr,
  input  logic [W_W-1:0]     w_data,
  input  logic               ev_valid,
  output logic               ev_ready,
  input  sne_event_t         ev,
  output logic               out_valid,
  input  logic               out_ready,
  output sne_event_t         out_ev
);
  localparam int PAD = (KS - 1) / 2;
  localparam logic signed [V_W:0] VMAX = (2 ** (V_W - 1)) - 1;
  localparam logic signed [V_W:0] VMIN = -(2 ** (V_W - 1));

  typedef enum logic [1:0] {IDLE, INTEG, LEAK} state_t;
  state_t state;

  logic [V_W-1:0] vmem [N_NEUR];
  logic [W_W-1:0] kmem [N_CH * KS * KS];
  always_ff @(posedge clk) if (w_we) kmem[w_addr] <= w_data;

  sne_event_t             cur;
  logic [$clog2(KS*KS):0] tap;
  logic [$clog2(N_NEUR):0] nidx;
  logic                   init_done;
  logic [$clog2(N_NEUR):0] init_idx;

  // integration: position of the neuron reached by tap (kx, ky)
  logic [$clog2(KS)-1:0] kx, ky;
  logic signed [9:0]     ox, oy;          // position relative to the tile
  logic                  in_tile;
  logic [$clog2(N_NEUR)-1:0] n_int;
  always_comb begin
    kx = ($clog2(KS))'(tap % KS);
    ky = ($clog2(KS))'(tap / KS);
    ox = 10'(cur.x) - 10'(kx) + 10'(PAD) - 10'(cfg.tile_x);
    oy = 10'(cur.y) - 10'(ky) + 10'(PAD) - 10'(cfg.tile_y);
    in_tile = (ox >= 0) && (ox < (1 << TW)) && (oy >= 0) && (oy < (1 << TW));
    n_int = {oy[TW-1:0], ox[TW-1:0]};
  end

  // one neuron update per cycle
  logic signed [V_W:0] v_int, v_leak;
  logic signed [W_W-1:0] wsel;
  logic [$clog2(N_NEUR)-1:0] n_lk;
  logic fire;
  always_comb begin
    wsel   = kmem[KAW'(cur.ch * (KS * KS)) + KAW'(tap)];
    v_int  = $signed({vmem[n_int][V_W-1], vmem[n_int]}) + (V_W+1)'(wsel);
    if (v_int > VMAX) v_int = VMAX;
    if (v_int < VMIN) v_int = VMIN;
    n_lk   = nidx[$clog2(N_NEUR)-1:0];
    v_leak = $signed({vmem[n_lk][V_W-1], vmem[n_lk]}) - $signed({1'b0, cfg.leak});
    if (v_leak < VMIN) v_leak = VMIN;
    fire   = v_leak >= $signed({cfg.vth[V_W-1], cfg.vth});
  end

  assign ev_ready = (state == IDLE) && init_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cur <= '0; tap <= '0; nidx <= '0;
      out_valid <= 1'b0; out_ev <= '0;
      init_done <= 1'b0; init_idx <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!init_done) begin                      // clear all states after reset
        vmem[init_idx[$clog2(N_NEUR)-1:0]] <= '0;
        init_idx <= init_idx + 1'b1;
        if (init_idx == ($clog2(N_NEUR)+1)'(N_NEUR - 1)) init_done <= 1'b1;
      end else begin
        unique case (state)
          IDLE: if (ev_valid) begin
            cur <= ev; tap <= '0; nidx <= '0;
            if (ev.op == OP_SPIKE)      state <= INTEG;
            else if (ev.op == OP_TSTEP) state <= LEAK;
          end
          INTEG: begin
            if (in_tile) vmem[n_int] <= v_int[V_W-1:0];
            tap <= tap + 1'b1;
            if (tap == ($clog2(KS*KS)+1)'(KS * KS - 1)) state <= IDLE;
          end
          LEAK: if (!out_valid || out_ready) begin
            if (fire) begin
              vmem[n_lk] <= '0;
              out_valid  <= 1'b1;
              out_ev.x   <= cfg.tile_x + 8'(n_lk[TW-1:0]);
              out_ev.y   <= cfg.tile_y + 8'(n_lk[2*TW-1:TW]);
              out_ev.t   <= cur.t;
              out_ev.op  <= OP_SPIKE;
              out_ev.ch  <= cfg.out_ch;
            end else begin
              vmem[n_lk] <= v_leak[V_W-1:0];
            end
            nidx <= nidx + 1'b1;
            if (nidx == ($clog2(N_NEUR)+1)'(N_NEUR - 1)) state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  a_out_stable : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_ev))
    else $error("sne_cluster: output event changed while stalled");
endmodule
