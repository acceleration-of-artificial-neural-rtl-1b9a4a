// Testbench of the convolution processor (2 rows x 3 columns) driven only
// through its register bus and three off-chip memory models with random
// back-pressure, as the control firmware would drive it:
//  - activations and weights are loaded with the three DMAs in parallel;
//  - a series of random layers (1-D and 2-D kernels, strides 1..3,
//    dilation, shifts, saturation) runs with alternating output sections,
//    later layers accumulating onto the previous layer's partial results;
//  - while each layer computes, the activation DMA stores the previous
//    layer's results from the other output section (store overlapped with
//    computation);
//  - every stored word is compared with a reference model, and each
//    layer's engine time must be n_og*kw*kh + 6 cycles.
`include "tb_util.svh"
module tb_csp;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(3000000)
  localparam int NR = 2, NC = 3;

  logic rst_n = 0, irq;
  reg_req_t reg_req = '0;
  logic [31:0] reg_rdata;
  ext_req_t [2:0] ext_req;
  ext_rsp_t [2:0] ext_rsp;

  csp #(.N_ROWS(NR), .N_COLS(NC)) dut (.*);
  ext_mem_model u_ext0 (.clk, .rst_n, .req(ext_req[0]), .rsp(ext_rsp[0]));
  ext_mem_model u_ext1 (.clk, .rst_n, .req(ext_req[1]), .rsp(ext_rsp[1]));
  ext_mem_model u_ext2 (.clk, .rst_n, .req(ext_req[2]), .rsp(ext_rsp[2]));

  `include "csp_tasks.svh"

  // engine time: from the start pulse to the done pulse
  int ce_cnt = 0, ce_lat = -1;
  bit ce_run = 0;
  always @(posedge clk) begin
    if (dut.ce_start) begin ce_cnt = 0; ce_run = 1; end
    else if (ce_run) begin
      ce_cnt++;
      if (dut.ce_done) begin ce_lat = ce_cnt - 1; ce_run = 0; end
    end
  end

  int n_acc = 0, n_overlap = 0, n_2d = 0, n_sat = 0, n_par_wdma = 0;
  always @(posedge clk) begin
    if (dut.dma_busy[1] && dut.dma_busy[2]) n_par_wdma++;
    if (dut.ce_busy && dut.dma_busy[0]) n_overlap++;
  end

  initial begin
    ce_cfg_t cfg, prev;
    u_ext0.ready_pct = 70; u_ext1.ready_pct = 50; u_ext2.ready_pct = 90;
    repeat (3) @(negedge clk); rst_n = 1;
    load_act_and_weights(5);
    for (int it = 0; it < 12; it++) begin
      bit overlap;
      random_cfg(cfg, 1'(it % 2), it % 3 != 0);
      program_ce(cfg);
      overlap = (it > 0);
      if (overlap) store_start(it % NR, int'(prev.out_sel), int'(prev.out_base), int'(prev.n_og), 0);
      reg_wr(R_CE_CTRL, 32'd1);
      wait_status(overlap ? 4'b0011 : 4'b0001);
      reference_run(cfg);
      `CHECK(ce_lat == int'(cfg.n_og) * int'(cfg.kw) * int'(cfg.kh) + 6,
             $sformatf("layer %0d: engine took %0d cycles, expected %0d", it, ce_lat,
                       int'(cfg.n_og) * int'(cfg.kw) * int'(cfg.kh) + 6))
      if (overlap) store_check(it % NR, int'(prev.out_sel), int'(prev.out_base), int'(prev.n_og), 0, "overlapped store");
      for (int r = 0; r < NR; r++) begin
        store_start(r, int'(cfg.out_sel), int'(cfg.out_base), int'(cfg.n_og), 1 + r);
        wait_status(4'b0010);
        store_check(r, int'(cfg.out_sel), int'(cfg.out_base), int'(cfg.n_og), 1 + r, $sformatf("layer %0d", it));
        for (int o = 0; o < 4 * int'(cfg.n_og); o++)
          if (ref_out[r][cfg.out_sel][int'(cfg.out_base) + o] inside {16'sh7fff, -16'sh8000}) n_sat++;
      end
      if (cfg.acc_en) n_acc++;
      if (cfg.kh > 1) n_2d++;
      prev = cfg;
    end
    `CHECK(irq == 0, "interrupt still pending after all status bits were cleared")
    `CHECK(n_acc > 0, "accumulation never exercised")
    `CHECK(n_overlap > 0, "store never overlapped with computation")
    `CHECK(n_2d > 0, "2-D kernel never exercised")
    `CHECK(n_sat > 0, "saturation never exercised")
    `CHECK(n_par_wdma > 0, "weight DMAs never ran in parallel")
    `CHECK(u_ext0.n_stalls > 0 && u_ext1.n_stalls > 0, "port back-pressure never happened")
    $display("layers with accumulation %0d, cycles of store overlapped with computation %0d, saturated samples %0d", n_acc, n_overlap, n_sat);
    `TB_FINISH
  end
endmodule
