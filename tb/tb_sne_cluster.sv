// Testbench of sne_cluster: random weights, tile position, leak and
// threshold; a random stream of input spikes (inside, at the edge of and
// outside the tile's receptive field) and time-step events, with random
// stalls on the output. A reference model of the 64 integrate-and-fire
// neurons gives the expected output spikes, compared in order. Timing
// checks: a spike event occupies the cluster for KS*KS cycles and a time
// step for 64 cycles plus output stalls (one neuron state update per cycle).
`include "tb_util.svh"
module tb_sne_cluster;
  import sne_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(500000)
  localparam int KS = 3, NCH = 16;

  logic rst_n = 0;
  sne_ccfg_t cfg = '0;
  logic w_we = 0;
  logic [$clog2(NCH*KS*KS)-1:0] w_addr = '0;
  logic [W_W-1:0] w_data = '0;
  logic ev_valid = 0, ev_ready, out_valid, out_ready = 1;
  sne_event_t ev = '0, out_ev;

  sne_cluster #(.N_NEUR(64), .KS(KS), .N_CH(NCH)) dut (.*);

  int v [64];
  int w [NCH * KS * KS];
  sne_event_t exp_q [$];
  int n_fired = 0, n_stall = 0, n_leak_floor = 0, n_sat = 0;
  int out_pct = 100;

  always @(negedge clk) out_ready = ($urandom % 100) < out_pct;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      `CHECK(exp_q.size() > 0, "unexpected output spike")
      if (exp_q.size() > 0) begin
        sne_event_t e;
        e = exp_q.pop_front();
        `CHECK(out_ev == e, $sformatf("output spike %h, expected %h", out_ev, e))
      end
    end
  end

  function automatic int sat8(int x);
    return x > 127 ? 127 : (x < -128 ? -128 : x);
  endfunction

  task automatic model(sne_event_t e);
    if (e.op == OP_SPIKE) begin
      for (int t = 0; t < KS * KS; t++) begin
        int ox, oy, n, s;
        ox = int'(e.x) - t % KS + 1 - int'(cfg.tile_x);
        oy = int'(e.y) - t / KS + 1 - int'(cfg.tile_y);
        if (ox >= 0 && ox < 8 && oy >= 0 && oy < 8) begin
          n = oy * 8 + ox;
          s = v[n] + w[int'(e.ch) * KS * KS + t];
          if (s != sat8(s)) n_sat++;
          v[n] = sat8(s);
        end
      end
    end else if (e.op == OP_TSTEP) begin
      for (int n = 0; n < 64; n++) begin
        int lv;
        lv = v[n] - int'(cfg.leak);
        if (lv < -128) begin lv = -128; n_leak_floor++; end
        if (lv >= int'($signed(cfg.vth))) begin
          sne_event_t o;
          o.x = cfg.tile_x + 8'(n % 8); o.y = cfg.tile_y + 8'(n / 8);
          o.t = e.t; o.op = OP_SPIKE; o.ch = cfg.out_ch;
          exp_q.push_back(o);
          v[n] = 0; n_fired++;
        end else v[n] = lv;
      end
    end
  endtask

  int busy_spike = 0, busy_tstep = 0;
  task automatic send(sne_event_t e);
    int c, s0;
    @(negedge clk);
    ev_valid = 1; ev = e;
    while (!ev_ready) @(negedge clk);
    @(negedge clk);
    ev_valid = 0;
    model(e);
    c = 1; s0 = n_stall;
    while (!ev_ready) begin @(negedge clk); c++; end
    if (e.op == OP_SPIKE)
      `CHECK(c == KS * KS + 1, $sformatf("spike event kept the cluster busy %0d cycles", c - 1))
    else if (e.op == OP_TSTEP)
      `CHECK(c == 64 + 1 + (n_stall - s0), $sformatf("time step kept the cluster busy %0d cycles (%0d stalls)", c - 1, n_stall - s0))
  endtask

  initial begin
    for (int phase = 0; phase < 6; phase++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      cfg.tile_x = 8'(8 * ($urandom % 4)); cfg.tile_y = 8'(8 * ($urandom % 4));
      cfg.out_ch = 4'($urandom); cfg.leak = 8'($urandom % 6);
      cfg.vth = 8'(4 + $urandom % 40);
      out_pct = (phase % 2) ? 40 : 100;
      if (phase == 2) cfg.vth = 8'd127;                   // potentials run into the upper limit
      if (phase == 3) begin cfg.leak = 8'd60; cfg.vth = 8'd100; end  // and into the lower one
      for (int i = 0; i < NCH * KS * KS; i++) begin
        @(negedge clk);
        w_we = 1; w_addr = 8'(i); w_data = 4'($urandom % 16);
        if (phase < 3) w_data = 4'($urandom % 8);   // excitatory only: many spikes
        w[i] = int'($signed(w_data));
      end
      @(negedge clk); w_we = 0;
      foreach (v[i]) v[i] = 0;
      for (int t = 0; t < 12; t++) begin
        int ns;
        ns = (phase == 2) ? 60 : $urandom % 30;
        for (int k = 0; k < ns; k++) begin
          sne_event_t e;
          e = '0;
          e.op = OP_SPIKE; e.ch = 4'($urandom);
          e.x = cfg.tile_x + 8'($urandom % 12) - 8'd2;
          e.y = cfg.tile_y + 8'($urandom % 12) - 8'd2;
          e.t = 8'(t);
          send(e);
        end
        begin
          sne_event_t e;
          e = '0; e.op = OP_TSTEP; e.t = 8'(t);
          send(e);
        end
      end
      send('0);   // a no-operation event is accepted and ignored
      repeat (5) @(negedge clk);
      `CHECK(exp_q.size() == 0, $sformatf("%0d expected output spikes missing", exp_q.size()))
      exp_q.delete();
    end
    `CHECK(n_fired > 0 && n_stall > 0 && n_leak_floor + n_sat > 0,
           $sformatf("mechanism missing: fired %0d stalls %0d floor %0d sat %0d", n_fired, n_stall, n_leak_floor, n_sat))
    $display("fired %0d, output stalls %0d", n_fired, n_stall);
    `TB_FINISH
  end
endmodule
