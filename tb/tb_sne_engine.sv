// Testbench of sne_engine (2 slices x 16 clusters): each slice gets its own
// cluster configurations and kernels through the engine's configuration
// port; input events are sent with different slice enables (both slices,
// only one, then the other), so disabled slices must keep their states
// untouched. Output spikes of both slices are merged onto one stream with
// random stalls and matched against the reference model. Timing: with any
// slice enabled, an input spike is accepted every KS*KS+1 cycles.
`include "tb_util.svh"
module tb_sne_engine;
  import sne_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(2000000)
  localparam int NS = 2, NCL = 16;

  logic rst_n = 0;
  logic [NS-1:0] slice_en = '1;
  logic cfg_we = 0, cfg_kernel = 0;
  logic [0:0] cfg_slice = '0;
  logic [3:0] cfg_cluster = '0;
  sne_ccfg_t cfg_data = '0;
  logic [7:0] w_addr = '0;
  logic [W_W-1:0] w_data = '0;
  logic ev_valid = 0, ev_ready, out_valid, out_ready = 1;
  sne_event_t ev = '0, out_ev;

  sne_engine dut (.*);
  `include "sne_model.svh"

  int out_pct = 100, n_stall = 0, n_both = 0;
  always @(negedge clk) out_ready = ($urandom % 100) < out_pct;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) m_seen(out_ev);
    if (dut.s_ovalid == 2'b11) n_both++;
  end

  task automatic send(sne_event_t e);
    int c;
    @(negedge clk);
    ev_valid = 1; ev = e;
    while (!ev_ready) @(negedge clk);
    @(negedge clk);
    ev_valid = 0;
    m_event(e, slice_en);
    c = 1;
    while (!ev_ready) begin @(negedge clk); c++; end
    if (e.op == OP_SPIKE) `CHECK(c == 10, $sformatf("spike kept the engine busy %0d cycles", c - 1))
  endtask

  initial begin
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      for (int c = 0; c < NCL; c++) begin
        @(negedge clk);
        cfg_we = 1; cfg_kernel = 0; cfg_slice = 1'(s); cfg_cluster = 4'(c);
        cfg_data.tile_x = 8'(8 * (c % 4)); cfg_data.tile_y = 8'(8 * (c / 4));
        cfg_data.out_ch = 4'(s * 8 + c % 8); cfg_data.leak = 8'($urandom % 4); cfg_data.vth = 8'(6 + $urandom % 20);
        m_cfg[s][c] = cfg_data;
      end
      for (int c = 0; c < NCL; c++)
        for (int i = 0; i < 144; i++) begin
          @(negedge clk);
          cfg_we = 1; cfg_kernel = 1; cfg_slice = 1'(s); cfg_cluster = 4'(c); w_addr = 8'(i);
          w_data = ($urandom % 3 != 0) ? 4'($urandom % 8) : 4'($urandom);
          m_w[s][c][i] = int'($signed(w_data));
        end
    end
    @(negedge clk); cfg_we = 0;
    m_reset();
    for (int phase = 0; phase < 4; phase++) begin
      slice_en = (phase == 1) ? 2'b01 : (phase == 2) ? 2'b10 : 2'b11;
      out_pct = (phase == 3) ? 35 : 100;
      for (int t = 0; t < 5; t++) begin
        for (int k = 0; k < 25; k++) begin
          sne_event_t e;
          e = '0; e.op = OP_SPIKE; e.ch = 4'($urandom); e.t = 8'(phase * 8 + t);
          e.x = 8'($urandom % 34); e.y = 8'($urandom % 34);
          send(e);
        end
        begin
          sne_event_t e;
          e = '0; e.op = OP_TSTEP; e.t = 8'(phase * 8 + t);
          send(e);
        end
      end
      repeat (20) @(negedge clk);
      `CHECK(m_n_pending == 0, $sformatf("phase %0d: %0d expected output spikes missing", phase, m_n_pending))
    end
    `CHECK(m_n_fired > 0 && n_stall > 0 && n_both > 0,
           $sformatf("mechanism missing: fired %0d stalls %0d both slices waiting %0d", m_n_fired, n_stall, n_both))
    $display("fired %0d, stalls %0d, cycles with both slices waiting %0d", m_n_fired, n_stall, n_both);
    `TB_FINISH
  end
endmodule
