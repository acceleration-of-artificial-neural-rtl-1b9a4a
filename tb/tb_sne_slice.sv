// Testbench of sne_slice (16 clusters of 64 neurons): clusters are given
// different tiles, output channels, leaks and thresholds (some share a tile
// so their spikes collide on the output), then random input spikes and time
// steps are broadcast with random output stalls. Every output spike must
// match one expected by the reference model, and none may be missing at the
// end. Timing: a broadcast spike is absorbed by all clusters in KS*KS
// cycles, so the slice accepts one input spike every KS*KS+1 cycles.
`include "tb_util.svh"
module tb_sne_slice;
  import sne_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(1000000)
  localparam int NS = 1, NCL = 16;

  logic rst_n = 0;
  logic cfg_we = 0, w_we = 0;
  logic [3:0] cfg_cluster = '0, w_cluster = '0;
  sne_ccfg_t cfg_data = '0;
  logic [7:0] w_addr = '0;
  logic [W_W-1:0] w_data = '0;
  logic ev_valid = 0, ev_ready, out_valid, out_ready = 1;
  sne_event_t ev = '0, out_ev;

  sne_slice dut (.*);
  `include "sne_model.svh"

  int out_pct = 100, n_stall = 0, n_multi = 0;
  always @(negedge clk) out_ready = ($urandom % 100) < out_pct;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) m_seen(out_ev);
    if ($countones(dut.c_ovalid) > 1) n_multi++;
  end

  task automatic send(sne_event_t e);
    int c;
    @(negedge clk);
    ev_valid = 1; ev = e;
    while (!ev_ready) @(negedge clk);
    @(negedge clk);
    ev_valid = 0;
    m_event(e, 1'b1);
    c = 1;
    while (!ev_ready) begin @(negedge clk); c++; end
    if (e.op == OP_SPIKE) `CHECK(c == 10, $sformatf("spike kept the slice busy %0d cycles", c - 1))
  endtask

  initial begin
    for (int phase = 0; phase < 3; phase++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      out_pct = (phase == 1) ? 30 : 100;
      for (int c = 0; c < NCL; c++) begin
        @(negedge clk);
        cfg_we = 1; cfg_cluster = 4'(c);
        cfg_data.tile_x = 8'(8 * ((c % 8) % 4)); cfg_data.tile_y = 8'(8 * ((c % 8) / 4));
        cfg_data.out_ch = 4'(c); cfg_data.leak = 8'($urandom % 4); cfg_data.vth = 8'(6 + $urandom % 20);
        m_cfg[0][c] = cfg_data;
      end
      @(negedge clk); cfg_we = 0;
      for (int c = 0; c < NCL; c++)
        for (int i = 0; i < 144; i++) begin
          @(negedge clk);
          w_we = 1; w_cluster = 4'(c); w_addr = 8'(i);
          w_data = 4'($urandom % 16);
          if ($urandom % 3 != 0) w_data = 4'($urandom % 8);
          m_w[0][c][i] = int'($signed(w_data));
        end
      @(negedge clk); w_we = 0;
      m_reset();
      repeat (70) @(negedge clk);   // clusters clear their states after reset
      for (int t = 0; t < 8; t++) begin
        for (int k = 0; k < 25; k++) begin
          sne_event_t e;
          e = '0; e.op = OP_SPIKE; e.ch = 4'($urandom); e.t = 8'(t);
          e.x = 8'($urandom % 34); e.y = 8'($urandom % 18);
          send(e);
        end
        begin
          sne_event_t e;
          e = '0; e.op = OP_TSTEP; e.t = 8'(t);
          send(e);
        end
      end
      repeat (20) @(negedge clk);
      `CHECK(m_n_pending == 0, $sformatf("%0d expected output spikes missing", m_n_pending))
      m_expected.delete(); m_n_pending = 0;
    end
    `CHECK(m_n_fired > 0 && n_stall > 0 && n_multi > 0,
           $sformatf("mechanism missing: fired %0d stalls %0d collisions %0d", m_n_fired, n_stall, n_multi))
    $display("fired %0d, stalls %0d, cycles with several clusters waiting %0d", m_n_fired, n_stall, n_multi);
    `TB_FINISH
  end
endmodule
