// Testbench of conv_engine (2 rows x 3 columns) with its memories: random
// activation and weight contents are loaded through the memories' DMA
// ports, then runs with random kernel sizes, dilations, strides 1..3, 2-D
// kernels and accumulation over a previous run's partial results are
// executed. Every output sample is compared with a reference convolution
// computed here, and every run must take n_og*kw*kh + 6 cycles from start
// to done (one MAC per DSP per cycle whatever the stride or dilation).
`include "tb_util.svh"
module tb_conv_engine;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(400000)
  localparam int R = 2, C = 3, D = 128;   // 8 banks x 128 = 1024 samples per memory
  localparam int SAW = $clog2(8 * D), AWW = SAW - 2;

  logic rst_n = 0, start = 0, busy, done;
  ce_cfg_t cfg;
  logic act_en, w_en, ps_en, ps_sec, out_we, out_sec;
  logic [SADDR_W-1:0] act_addr, ps_addr, out_addr;
  logic [1:0] act_stride;
  logic [WADDR_W-1:0] w_addr;
  quad_t [C-1:0] act_rdata;
  sample_t [R-1:0][C-1:0] w_rdata;
  quad_t [R-1:0] ps_rdata, out_wdata;

  conv_engine #(.N_ROWS(R), .N_COLS(C)) dut (.*);

  // memories, DMA ports driven by the testbench
  logic [C-1:0] ld_act;
  logic [R-1:0][C-1:0] ld_w;
  logic [R-1:0][1:0] ld_out, rd_out;
  logic [AWW-1:0] ld_addr;
  logic [7:0] ld_waddr;
  quad_t ld_data;
  quad_t [R-1:0][1:0] out_a_rdata, out_b_rdata;
  quad_t [C-1:0] act_a_rdata;
  for (genvar c = 0; c < C; c++) begin : g_act
    banked_mem #(.DEPTH(D)) u_m (.clk, .a_en(ld_act[c]), .a_we(ld_act[c]), .a_addr(ld_addr), .a_wdata(ld_data),
      .a_rdata(act_a_rdata[c]), .b_en(act_en), .b_we(1'b0), .b_addr(act_addr[SAW-1:0]), .b_stride(act_stride),
      .b_wdata('0), .b_rdata(act_rdata[c]));
  end
  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_w
      weight_bank u_w (.clk, .a_we(ld_w[r][c]), .a_addr(ld_waddr), .a_wdata(ld_data),
        .b_en(w_en), .b_addr(w_addr), .b_rdata(w_rdata[r][c]));
    end
    for (genvar s = 0; s < 2; s++) begin : g_s
      wire wr = out_we && out_sec == 1'(s);
      wire rd = ps_en && ps_sec == 1'(s);
      banked_mem #(.DEPTH(D)) u_o (.clk, .a_en(ld_out[r][s] || rd_out[r][s]), .a_we(ld_out[r][s]), .a_addr(ld_addr),
        .a_wdata(ld_data), .a_rdata(out_a_rdata[r][s]), .b_en(wr || rd), .b_we(wr),
        .b_addr(wr ? out_addr[SAW-1:0] : ps_addr[SAW-1:0]), .b_stride(2'd1), .b_wdata(out_wdata[r]),
        .b_rdata(out_b_rdata[r][s]));
    end
    assign ps_rdata[r] = out_b_rdata[r][~out_sec];
  end

  // reference contents
  sample_t ref_act [C][8 * D];
  sample_t ref_w   [R][C][1024];
  sample_t ref_out [R][2][8 * D];

  task automatic load_all();
    for (int c = 0; c < C; c++)
      for (int wd = 0; wd < 2 * D; wd++) begin
        @(negedge clk);
        ld_act = '0; ld_act[c] = 1; ld_addr = AWW'(wd);
        for (int l = 0; l < 4; l++) begin ld_data[l] = sample_t'($signed(16'($urandom)) >>> 5); ref_act[c][wd * 4 + l] = ld_data[l]; end
      end
    @(negedge clk); ld_act = '0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      for (int wd = 0; wd < 256; wd++) begin
        @(negedge clk);
        ld_w = '0; ld_w[r][c] = 1; ld_waddr = 8'(wd);
        for (int l = 0; l < 4; l++) begin ld_data[l] = sample_t'($signed(16'($urandom)) >>> 4); ref_w[r][c][wd * 4 + l] = ld_data[l]; end
      end
    @(negedge clk); ld_w = '0;
    for (int r = 0; r < R; r++) for (int s = 0; s < 2; s++)
      for (int wd = 0; wd < 2 * D; wd++) begin
        @(negedge clk);
        ld_out = '0; ld_out[r][s] = 1; ld_addr = AWW'(wd);
        for (int l = 0; l < 4; l++) begin ld_data[l] = sample_t'($urandom); ref_out[r][s][wd * 4 + l] = ld_data[l]; end
      end
    @(negedge clk); ld_out = '0;
  endtask

  function automatic sample_t sat16(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return -16'sh8000;
    return sample_t'(v);
  endfunction

  int n_runs_acc = 0, n_runs_2d = 0, n_runs_s3 = 0;

  initial begin
    cfg = '0; ld_act = '0; ld_w = '0; ld_out = '0; rd_out = '0; ld_addr = '0; ld_waddr = '0; ld_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    load_all();
    for (int run = 0; run < 16; run++) begin
      int n_taps, cycles, span;
      quad_t got;
      sample_t expv [R][4 * 8];
      cfg = '0;
      cfg.kw = 10'(1 + $urandom % 8);
      cfg.kh = 6'((run % 4 == 1) ? 2 + $urandom % 2 : 1);
      cfg.dilation = 10'(1 + $urandom % 4);
      cfg.stride = 2'(1 + $urandom % 3);
      if (run == 2) cfg.stride = 2'd3;
      cfg.row_step = 13'(40);
      cfg.n_og = 12'(1 + $urandom % 8);
      cfg.w_base = 10'($urandom % 512);
      cfg.out_base = 13'(4 * ($urandom % 64));
      cfg.out_sel = 1'($urandom);
      cfg.acc_en = (run % 3 == 2);
      cfg.qf = 6'($urandom % 8);
      span = (int'(cfg.n_og) * 4 - 1) * int'(cfg.stride) + (int'(cfg.kh) - 1) * 40 + (int'(cfg.kw) - 1) * int'(cfg.dilation);
      cfg.act_base = 13'($urandom % (8 * D - span));
      n_taps = int'(cfg.kw) * int'(cfg.kh);
      // reference
      for (int r = 0; r < R; r++)
        for (int o = 0; o < 4 * int'(cfg.n_og); o++) begin
          longint s;
          s = 0;
          for (int c = 0; c < C; c++)
            for (int ky = 0; ky < int'(cfg.kh); ky++)
              for (int kx = 0; kx < int'(cfg.kw); kx++)
                s += longint'(ref_act[c][int'(cfg.act_base) + o * int'(cfg.stride) + ky * 40 + kx * int'(cfg.dilation)])
                   * longint'(ref_w[r][c][int'(cfg.w_base) + ky * int'(cfg.kw) + kx]);
          s = s >>> cfg.qf;
          if (cfg.acc_en) s += longint'(ref_out[r][~cfg.out_sel][int'(cfg.out_base) + o]);
          expv[r][o] = sat16(s);
        end
      if (cfg.acc_en) n_runs_acc++;
      if (cfg.kh > 1) n_runs_2d++;
      if (cfg.stride == 3) n_runs_s3++;
      // run
      @(negedge clk); start = 1;
      @(posedge clk); cycles = 0;
      @(negedge clk); start = 0;
      while (!done && cycles < 5000) begin @(posedge clk); cycles++; #1; end
      `CHECK(cycles == int'(cfg.n_og) * n_taps + 6,
             $sformatf("run %0d took %0d cycles, expected %0d", run, cycles, int'(cfg.n_og) * n_taps + 6))
      // read back the written section through the DMA port
      for (int r = 0; r < R; r++)
        for (int g = 0; g < int'(cfg.n_og); g++) begin
          @(negedge clk);
          rd_out = '0; rd_out[r][cfg.out_sel] = 1; ld_addr = AWW'((int'(cfg.out_base) >> 2) + g);
          @(negedge clk); rd_out = '0;
          got = out_a_rdata[r][cfg.out_sel];
          for (int l = 0; l < 4; l++) begin
            `CHECK(got[l] == expv[r][4 * g + l],
                   $sformatf("run %0d row %0d sample %0d: %0d vs %0d", run, r, 4 * g + l, got[l], expv[r][4 * g + l]))
            ref_out[r][cfg.out_sel][int'(cfg.out_base) + 4 * g + l] = expv[r][4 * g + l];
          end
        end
    end
    `CHECK(n_runs_acc > 0 && n_runs_2d > 0 && n_runs_s3 > 0, "a mode was never exercised")
    `TB_FINISH
  end
endmodule
