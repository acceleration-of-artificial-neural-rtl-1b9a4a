// End-to-end testbench of neuraghe_top at its default (full) size: the
// 12x4 convolution processor, the 12x9 three-matrix MBConv engine and the
// two-slice spiking engine run at the same time, each fed by its own thread.
//  - Convolution processor: driven only through its register bus, with
//    three off-chip memory models applying random back-pressure. Weights
//    and activations are loaded by the three DMAs in parallel, then random
//    layers (1-D and 2-D kernels, strides 1..3, dilation, accumulation of
//    partial results, saturation) run on alternating output sections while
//    the previous layer's results are stored; every stored word is checked
//    and every layer must take n_og*kw*kh + 6 engine cycles.
//  - MBConv engine: streams of pixel batches with random gaps and output
//    stalls, checked batch by batch against a reference of the three phases.
//  - Spiking engine: cluster configurations and kernels for both slices,
//    then spikes and time steps with changing slice enables and output
//    stalls; output spikes are matched against a reference model.
// Each mechanism listed at the end is counted while it happens; a mechanism
// that never happened counts as a failure.
`include "tb_util.svh"
module tb_neuraghe_top;
  import neuraghe_pkg::*;
  import sne_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(3000000)
  localparam int NR = 4, NC = 12;                       // convolution array
  localparam int MR = 12, MC = 9, MKS = 3, MCI = 16;    // MBConv engine
  localparam int NS = 2, NCL = 16;                      // spiking engine

  logic rst_n = 0;
  // convolution processor
  reg_req_t reg_req = '0;
  logic [31:0] reg_rdata;
  logic csp_irq;
  ext_req_t [2:0] ext_req;
  ext_rsp_t [2:0] ext_rsp;
  // MBConv engine
  logic [4:0] mb_c_in = 5'd16;
  logic [2:0][4:0] mb_qf = '0;
  logic mb_hist_clr = 0, mb_w_we = 0;
  logic [1:0] mb_w_phase = '0;
  logic [3:0] mb_w_row = '0, mb_w_idx = '0;
  logic signed [15:0] mb_w_data = '0;
  logic mb_in_valid = 0, mb_in_ready, mb_out_valid, mb_out_ready = 1;
  logic signed [MC-1:0][MCI-1:0][15:0] mb_in_batch = '0;
  logic signed [MC-1:0][MR-1:0][15:0] mb_out_batch;
  // spiking engine
  logic [NS-1:0] sne_slice_en = '1;
  logic sne_cfg_we = 0, sne_cfg_kernel = 0;
  logic [0:0] sne_cfg_slice = '0;
  logic [3:0] sne_cfg_cluster = '0;
  sne_ccfg_t sne_cfg_data = '0;
  logic [7:0] sne_w_addr = '0;
  logic [W_W-1:0] sne_w_data = '0;
  logic sne_ev_valid = 0, sne_ev_ready, sne_out_valid, sne_out_ready = 1;
  sne_event_t sne_ev = '0, sne_out_ev;

  neuraghe_top dut (
    .clk, .rst_n,
    .csp_reg_req(reg_req), .csp_reg_rdata(reg_rdata), .csp_irq, .csp_ext_req(ext_req), .csp_ext_rsp(ext_rsp),
    .mb_c_in, .mb_qf, .mb_hist_clr, .mb_w_we, .mb_w_phase, .mb_w_row, .mb_w_idx, .mb_w_data,
    .mb_in_valid, .mb_in_ready, .mb_in_batch, .mb_out_valid, .mb_out_ready, .mb_out_batch,
    .sne_slice_en, .sne_cfg_we, .sne_cfg_kernel, .sne_cfg_slice, .sne_cfg_cluster, .sne_cfg_data,
    .sne_w_addr, .sne_w_data, .sne_ev_valid, .sne_ev_ready, .sne_ev, .sne_out_valid, .sne_out_ready, .sne_out_ev
  );
  ext_mem_model u_ext0 (.clk, .rst_n, .req(ext_req[0]), .rsp(ext_rsp[0]));
  ext_mem_model u_ext1 (.clk, .rst_n, .req(ext_req[1]), .rsp(ext_rsp[1]));
  ext_mem_model u_ext2 (.clk, .rst_n, .req(ext_req[2]), .rsp(ext_rsp[2]));

  `include "csp_tasks.svh"
  `include "sne_model.svh"

  // ---------------------------------------------------------------- counters
  int m_port_stall = 0, m_par_wdma = 0, m_dma_ce_overlap = 0, m_accumulate = 0, m_saturate = 0;
  int m_kernel_2d = 0, m_stride3 = 0, m_section_switch = 0, m_mb_3phase = 0, m_mb_stall = 0;
  int m_mb_history = 0, m_sne_fire = 0, m_sne_stall = 0, m_sne_slice_switch = 0, m_all_busy = 0;
  int ce_cnt = 0, ce_lat = -1;
  bit ce_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_csp.ce_start) begin ce_cnt = 0; ce_run = 1; end
    else if (ce_run) begin
      ce_cnt++;
      if (dut.u_csp.ce_done) begin ce_lat = ce_cnt - 1; ce_run = 0; end
    end
    if (dut.u_csp.dma_busy[1] && dut.u_csp.dma_busy[2]) m_par_wdma++;
    if (dut.u_csp.ce_busy && dut.u_csp.dma_busy[0]) m_dma_ce_overlap++;
    if (dut.u_mbconv.u_pw1.en && dut.u_mbconv.u_dw.en && dut.u_mbconv.u_pw2.en) m_mb_3phase++;
    if (mb_out_valid && !mb_out_ready) m_mb_stall++;
    if (sne_out_valid && !sne_out_ready) m_sne_stall++;
    if ((dut.u_csp.ce_busy || dut.u_csp.dma_busy != 0) && (dut.u_mbconv.u_pw1.en || dut.u_mbconv.u_pw2.en)
        && !sne_ev_ready) m_all_busy++;
  end

  // ---------------------------------------------------------------- CSP thread
  task automatic run_csp();
    ce_cfg_t cfg, prev;
    u_ext0.ready_pct = 75; u_ext1.ready_pct = 60; u_ext2.ready_pct = 85;
    load_act_and_weights(5);
    for (int it = 0; it < 8; it++) begin
      random_cfg(cfg, 1'(it % 2), 1'b0);
      if (it == 2) cfg.stride = 2'd3;
      if (it == 3) cfg.kh = 6'd2;
      if (it % 2 == 1) begin
        // accumulate onto the previous layer's results in the other section
        cfg.out_base = prev.out_base; cfg.n_og = prev.n_og; cfg.acc_en = 1'b1;
      end
      place_act(cfg);
      program_ce(cfg);
      if (it > 0) store_start(it % NR, int'(prev.out_sel), int'(prev.out_base), int'(prev.n_og), 0);
      reg_wr(R_CE_CTRL, 32'd1);
      wait_status(it > 0 ? 4'b0011 : 4'b0001);
      reference_run(cfg);
      `CHECK(ce_lat == int'(cfg.n_og) * int'(cfg.kw) * int'(cfg.kh) + 6,
             $sformatf("layer %0d: engine took %0d cycles, expected %0d", it, ce_lat, int'(cfg.n_og) * int'(cfg.kw) * int'(cfg.kh) + 6))
      if (it > 0) store_check(it % NR, int'(prev.out_sel), int'(prev.out_base), int'(prev.n_og), 0, "overlapped store");
      for (int r = 0; r < NR; r++) begin
        store_start(r, int'(cfg.out_sel), int'(cfg.out_base), int'(cfg.n_og), 1 + r);
        wait_status(4'b0010);
        store_check(r, int'(cfg.out_sel), int'(cfg.out_base), int'(cfg.n_og), 1 + r, $sformatf("layer %0d", it));
        for (int o = 0; o < 4 * int'(cfg.n_og); o++)
          if (ref_out[r][cfg.out_sel][int'(cfg.out_base) + o] inside {16'sh7fff, -16'sh8000}) m_saturate++;
      end
      if (cfg.acc_en) m_accumulate++;
      if (cfg.kh > 1) m_kernel_2d++;
      if (cfg.stride == 3) m_stride3++;
      if (it > 0 && cfg.out_sel != prev.out_sel) m_section_switch++;
      prev = cfg;
    end
    m_port_stall = u_ext0.n_stalls + u_ext1.n_stalls + u_ext2.n_stalls;
    `CHECK(csp_irq == 0, "interrupt pending after all status bits were cleared")
  endtask

  // ---------------------------------------------------------------- MBConv thread
  int w1 [MR][MCI], wd [MR][MKS], w2 [MR][MR];
  int ehist [MKS-1][MR];
  typedef logic signed [MC-1:0][MR-1:0][15:0] ob_t;
  ob_t mb_exp_q [$];
  int mb_n_out = 0;

  function automatic int sat_sh(longint v, int q);
    longint s;
    s = v >>> q;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  function automatic void mb_model(logic signed [MC-1:0][MCI-1:0][15:0] b);
    int e [MC][MR], d [MC][MR];
    ob_t o;
    for (int p = 0; p < MC; p++)
      for (int r = 0; r < MR; r++) begin
        longint s;
        s = 0;
        for (int i = 0; i < int'(mb_c_in); i++) s += longint'($signed(b[p][i])) * w1[r][i];
        e[p][r] = sat_sh(s, int'(mb_qf[0]));
      end
    for (int p = 0; p < MC; p++)
      for (int r = 0; r < MR; r++) begin
        longint s;
        s = 0;
        for (int k = 0; k < MKS; k++) begin
          int q;
          q = p + k - (MKS - 1);
          s += longint'(q >= 0 ? e[q][r] : ehist[q + MKS - 1][r]) * wd[r][k];
        end
        d[p][r] = sat_sh(s, int'(mb_qf[1]));
      end
    for (int p = 0; p < MC; p++)
      for (int r = 0; r < MR; r++) begin
        longint s;
        s = 0;
        for (int j = 0; j < MR; j++) s += longint'(d[p][j]) * w2[r][j];
        o[p][r] = 16'(sat_sh(s, int'(mb_qf[2])));
      end
    for (int j = 0; j < MKS - 1; j++) for (int r = 0; r < MR; r++) ehist[j][r] = e[MC - (MKS - 1) + j][r];
    mb_exp_q.push_back(o);
  endfunction

  int mb_out_pct = 100;
  always @(negedge clk) begin
    mb_out_ready = ($urandom % 100) < mb_out_pct;
    sne_out_ready = ($urandom % 100) < 60;
  end
  always @(posedge clk) if (rst_n && mb_out_valid && mb_out_ready) begin
    `CHECK(mb_exp_q.size() > 0, "unexpected MBConv output batch")
    if (mb_exp_q.size() > 0) begin
      ob_t e;
      e = mb_exp_q.pop_front();
      `CHECK(mb_out_batch == e, $sformatf("MBConv output batch %0d differs from the reference", mb_n_out))
    end
    mb_n_out++;
  end

  bit sne_configured = 0;
  task automatic run_mbconv();
    wait (sne_configured);     // start streaming while the spiking engine is busy too
    for (int s = 0; s < 4; s++) begin
      mb_c_in = 5'(4 + $urandom % 13);
      mb_qf[0] = 5'(4 + $urandom % 5); mb_qf[1] = 5'(5 + $urandom % 4); mb_qf[2] = 5'(6 + $urandom % 4);
      for (int ph = 0; ph < 3; ph++)
        for (int r = 0; r < MR; r++)
          for (int i = 0; i < ((ph == 0) ? MCI : (ph == 1) ? MKS : MR); i++) begin
            @(negedge clk);
            mb_w_we = 1; mb_w_phase = 2'(ph); mb_w_row = 4'(r); mb_w_idx = 4'(i);
            mb_w_data = $signed(16'($urandom)) >>> 9;
            if (ph == 0) w1[r][i] = int'(mb_w_data); else if (ph == 1) wd[r][i] = int'(mb_w_data); else w2[r][i] = int'(mb_w_data);
          end
      @(negedge clk); mb_w_we = 0; mb_hist_clr = 1;
      foreach (ehist[j, r]) ehist[j][r] = 0;
      @(negedge clk); mb_hist_clr = 0;
      mb_out_pct = (s % 2) ? 50 : 100;
      for (int b = 0; b < 10; b++) begin
        logic signed [MC-1:0][MCI-1:0][15:0] bt;
        for (int p = 0; p < MC; p++) for (int i = 0; i < MCI; i++) bt[p][i] = $signed(16'($urandom)) >>> 6;
        if (s % 2) repeat ($urandom % 6) @(negedge clk);
        mb_in_valid = 1; mb_in_batch = bt;
        while (!mb_in_ready) @(negedge clk);
        mb_model(bt);
        if (b > 0) m_mb_history++;
        @(negedge clk); mb_in_valid = 0;
      end
      while (mb_exp_q.size() > 0) @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------------- SNE thread
  always @(posedge clk) if (rst_n && sne_out_valid && sne_out_ready) m_seen(sne_out_ev);

  task automatic sne_send(sne_event_t e);
    @(negedge clk);
    sne_ev_valid = 1; sne_ev = e;
    while (!sne_ev_ready) @(negedge clk);
    @(negedge clk);
    sne_ev_valid = 0;
    m_event(e, sne_slice_en);
  endtask

  task automatic run_sne();
    for (int s = 0; s < NS; s++) begin
      for (int c = 0; c < NCL; c++) begin
        @(negedge clk);
        sne_cfg_we = 1; sne_cfg_kernel = 0; sne_cfg_slice = 1'(s); sne_cfg_cluster = 4'(c);
        sne_cfg_data.tile_x = 8'(8 * (c % 4)); sne_cfg_data.tile_y = 8'(8 * (c / 4));
        sne_cfg_data.out_ch = 4'(s * 8 + c % 8); sne_cfg_data.leak = 8'($urandom % 4);
        sne_cfg_data.vth = 8'(6 + $urandom % 20);
        m_cfg[s][c] = sne_cfg_data;
      end
      for (int c = 0; c < NCL; c++)
        for (int i = 0; i < 144; i++) begin
          @(negedge clk);
          sne_cfg_we = 1; sne_cfg_kernel = 1; sne_cfg_slice = 1'(s); sne_cfg_cluster = 4'(c); sne_w_addr = 8'(i);
          sne_w_data = ($urandom % 3 != 0) ? 4'($urandom % 8) : 4'($urandom);
          m_w[s][c][i] = int'($signed(sne_w_data));
        end
    end
    @(negedge clk); sne_cfg_we = 0;
    m_reset();
    sne_configured = 1;
    for (int phase = 0; phase < 3; phase++) begin
      logic [NS-1:0] en;
      en = (phase == 1) ? 2'b01 : 2'b11;
      if (en != sne_slice_en) m_sne_slice_switch++;
      sne_slice_en = en;
      for (int t = 0; t < 4; t++) begin
        for (int k = 0; k < 30; k++) begin
          sne_event_t e;
          e = '0; e.op = OP_SPIKE; e.ch = 4'($urandom); e.t = 8'(phase * 8 + t);
          e.x = 8'($urandom % 34); e.y = 8'($urandom % 34);
          sne_send(e);
        end
        begin
          sne_event_t e;
          e = '0; e.op = OP_TSTEP; e.t = 8'(phase * 8 + t);
          sne_send(e);
        end
      end
    end
    while (!sne_ev_ready || sne_out_valid) @(negedge clk);   // last time step drained
    repeat (4) @(negedge clk);
    `CHECK(m_n_pending == 0, $sformatf("%0d expected output spikes missing", m_n_pending))
    m_sne_fire = m_n_fired;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (70) @(negedge clk);            // spiking clusters clear their states
    fork
      run_csp();
      run_mbconv();
      run_sne();
    join
    `CHECK(m_port_stall > 0,       "mechanism never seen: off-chip port back-pressure")
    `CHECK(m_par_wdma > 0,         "mechanism never seen: both weight DMAs active together")
    `CHECK(m_dma_ce_overlap > 0,   "mechanism never seen: DMA transfer during convolution")
    `CHECK(m_accumulate > 0,       "mechanism never seen: accumulation of partial results")
    `CHECK(m_saturate > 0,         "mechanism never seen: output saturation")
    `CHECK(m_kernel_2d > 0,        "mechanism never seen: 2-D kernel")
    `CHECK(m_stride3 > 0,          "mechanism never seen: stride 3")
    `CHECK(m_section_switch > 0,   "mechanism never seen: output section switch")
    `CHECK(m_mb_3phase > 0,        "mechanism never seen: three MBConv phases busy together")
    `CHECK(m_mb_stall > 0,         "mechanism never seen: MBConv output stall")
    `CHECK(m_mb_history > 0,       "mechanism never seen: depthwise history across batches")
    `CHECK(m_sne_fire > 0,         "mechanism never seen: neuron firing")
    `CHECK(m_sne_stall > 0,        "mechanism never seen: spike output stall")
    `CHECK(m_sne_slice_switch > 0, "mechanism never seen: slice enable change")
    `CHECK(m_all_busy > 0,         "mechanism never seen: all three engines busy together")
    $display("port stalls %0d, parallel weight DMA cycles %0d, DMA/CE overlap cycles %0d, accumulating layers %0d",
             m_port_stall, m_par_wdma, m_dma_ce_overlap, m_accumulate);
    $display("saturated samples %0d, 2-D layers %0d, stride-3 layers %0d, section switches %0d",
             m_saturate, m_kernel_2d, m_stride3, m_section_switch);
    $display("MBConv: batches %0d, 3-phase cycles %0d, stalls %0d; SNE: spikes fired %0d, stalls %0d; all busy %0d",
             mb_n_out, m_mb_3phase, m_mb_stall, m_sne_fire, m_sne_stall, m_all_busy);
    `TB_FINISH
  end
endmodule
