// Testbench tasks that drive the convolution processor through its register
// bus, in the way the control processor's firmware would. Included inside a
// testbench module that declares: clk, reg_req (reg_req_t), reg_rdata,
// checks/failures, three ext_mem_model instances u_ext0..u_ext2 (activation
// DMA, weight DMA 1, weight DMA 2), and the parameters NR, NC (array size).
// The testbench keeps a reference copy of the on-chip memories (ref_act,
// ref_w, ref_out) and computes the expected convolution from it.
`ifndef CSP_TASKS_SVH
`define CSP_TASKS_SVH

  localparam int ACT_SAMPLES = 1024;       // samples used per column memory
  localparam int W_PER_SOP   = 256;        // weights used per SoP bank
  sample_t ref_act [NC][ACT_SAMPLES];
  sample_t ref_w   [NR][NC][W_PER_SOP];
  sample_t ref_out [NR][2][ACT_SAMPLES];
  bit      known   [NR][2][ACT_SAMPLES];

  task automatic reg_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); reg_req = '0;
  endtask

  task automatic reg_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1 d = reg_rdata;
    @(negedge clk); reg_req = '0;
  endtask

  // poll the status register until all bits of 'm' are set, then clear them
  task automatic wait_status(logic [3:0] m, int limit = 200000);
    logic [31:0] s;
    int n;
    n = 0;
    do begin reg_rd(R_STATUS, s); n++; end while ((s[3:0] & m) != m && n < limit);
    `CHECK((s[3:0] & m) == m, $sformatf("status bits %b never set", m))
    reg_wr(R_STATUS, 32'(m));
  endtask

  task automatic dma_go(int k, bit store, logic [31:0] ext, logic [19:0] loc, int len);
    reg_wr(R_DMA0 + 8'(4 * k + 1), ext);
    reg_wr(R_DMA0 + 8'(4 * k + 2), 32'(loc));
    reg_wr(R_DMA0 + 8'(4 * k + 3), 32'(len));
    reg_wr(R_DMA0 + 8'(4 * k), {30'd0, store, 1'b1});
  endtask

  function automatic logic [19:0] loc_act(int c, int word);
    return {REG_ACT, 5'(c), 11'(word)};
  endfunction
  function automatic logic [19:0] loc_out(int r, int s, int word);
    return {(s == 0) ? REG_OUT0 : REG_OUT1, 5'(r), 11'(word)};
  endfunction
  function automatic logic [19:0] loc_wgt(int r, int c, int word);
    return {REG_WGT, 8'(r * NC + c), 8'(word)};
  endfunction

  // put random activations and weights off-chip and load them with the
  // activation DMA and both weight DMAs running at the same time
  localparam logic [31:0] EXT_ACT = 32'h0010_0000, EXT_W = 32'h0020_0000, EXT_OUT = 32'h0040_0000;
  task automatic load_act_and_weights(int act_shift);
    for (int c = 0; c < NC; c++)
      for (int wd = 0; wd < ACT_SAMPLES / 4; wd++) begin
        quad_t q;
        for (int l = 0; l < 4; l++) begin
          q[l] = sample_t'($signed(16'($urandom)) >>> act_shift);
          ref_act[c][wd * 4 + l] = q[l];
        end
        u_ext0.mem[(EXT_ACT >> 3) + c * (ACT_SAMPLES / 4) + wd] = q;
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        for (int wd = 0; wd < W_PER_SOP / 4; wd++) begin
          quad_t q;
          for (int l = 0; l < 4; l++) begin
            q[l] = sample_t'($signed(16'($urandom)) >>> act_shift);
            ref_w[r][c][wd * 4 + l] = q[l];
          end
          if (r < (NR + 1) / 2) u_ext1.mem[(EXT_W >> 3) + (r * NC + c) * (W_PER_SOP / 4) + wd] = q;
          else                  u_ext2.mem[(EXT_W >> 3) + (r * NC + c) * (W_PER_SOP / 4) + wd] = q;
        end
    // one transfer per column memory / weight bank; the three DMAs overlap
    for (int i = 0; i < ((NC > NR * NC) ? NC : NR * NC); i++) begin
      logic [3:0] m;
      m = '0;
      if (i < NC) begin
        dma_go(0, 0, EXT_ACT + 32'(i * ACT_SAMPLES * 2), loc_act(i, 0), ACT_SAMPLES / 4);
        m[1] = 1;
      end
      if (i < ((NR + 1) / 2) * NC) begin
        dma_go(1, 0, EXT_W + 32'(i * W_PER_SOP * 2), loc_wgt(i / NC, i % NC, 0), W_PER_SOP / 4);
        m[2] = 1;
      end
      if (i < (NR - (NR + 1) / 2) * NC) begin
        int j;
        j = i + ((NR + 1) / 2) * NC;
        dma_go(2, 0, EXT_W + 32'(j * W_PER_SOP * 2), loc_wgt(j / NC, j % NC, 0), W_PER_SOP / 4);
        m[3] = 1;
      end
      wait_status(m);
    end
  endtask

  function automatic sample_t sat16(longint v);
    if (v > 32767)  return 16'sh7fff;
    if (v < -32768) return -16'sh8000;
    return sample_t'(v);
  endfunction

  // random layer configuration that fits the memories
  task automatic random_cfg(output ce_cfg_t cfg, input bit out_sel, input bit want_acc);
    int span, taps;
    cfg = '0;
    cfg.kh       = 6'(1 + (($urandom % 3 == 0) ? $urandom % 3 : 0));
    cfg.kw       = 10'(1 + $urandom % 6);
    cfg.dilation = 10'(1 + $urandom % 4);
    cfg.stride   = 2'(1 + $urandom % 3);
    cfg.row_step = 13'(48);
    cfg.n_og     = 12'(1 + $urandom % 12);
    taps         = int'(cfg.kw) * int'(cfg.kh);
    cfg.w_base   = 10'($urandom % (W_PER_SOP - taps + 1));
    cfg.out_base = 13'(4 * ($urandom % 32));
    cfg.out_sel  = out_sel;
    cfg.qf       = 6'($urandom % 10);
    span = (int'(cfg.n_og) * 4 - 1) * int'(cfg.stride) + (int'(cfg.kh) - 1) * 48 + (int'(cfg.kw) - 1) * int'(cfg.dilation);
    cfg.act_base = 13'($urandom % (ACT_SAMPLES - span));
    cfg.acc_en   = 0;
    if (want_acc) begin
      bit ok;
      ok = 1;
      for (int r = 0; r < NR; r++)
        for (int o = 0; o < 4 * int'(cfg.n_og); o++) ok &= known[r][~out_sel][int'(cfg.out_base) + o];
      cfg.acc_en = ok;
    end
  endtask

  // pick a random first window that keeps the whole layer inside memory
  task automatic place_act(inout ce_cfg_t cfg);
    int span;
    span = (int'(cfg.n_og) * 4 - 1) * int'(cfg.stride) + (int'(cfg.kh) - 1) * int'(cfg.row_step)
         + (int'(cfg.kw) - 1) * int'(cfg.dilation);
    cfg.act_base = 13'($urandom % (ACT_SAMPLES - span));
    if (int'(cfg.w_base) + int'(cfg.kw) * int'(cfg.kh) > W_PER_SOP) cfg.w_base = '0;
  endtask

  task automatic program_ce(ce_cfg_t cfg);
    reg_wr(R_CE_KER,   {10'd0, cfg.kh, 6'd0, cfg.kw});
    reg_wr(R_CE_DS,    {14'd0, cfg.stride, 6'd0, cfg.dilation});
    reg_wr(R_CE_ROW,   32'(cfg.row_step));
    reg_wr(R_CE_NOG,   32'(cfg.n_og));
    reg_wr(R_CE_ABASE, 32'(cfg.act_base));
    reg_wr(R_CE_WBASE, 32'(cfg.w_base));
    reg_wr(R_CE_OBASE, 32'(cfg.out_base));
    reg_wr(R_CE_MODE,  {18'd0, cfg.qf, 6'd0, cfg.out_sel, cfg.acc_en});
  endtask

  // expected outputs of a run, written into ref_out
  task automatic reference_run(ce_cfg_t cfg);
    sample_t res [NR][];
    for (int r = 0; r < NR; r++) begin
      res[r] = new[4 * int'(cfg.n_og)];
      for (int o = 0; o < 4 * int'(cfg.n_og); o++) begin
        longint s;
        s = 0;
        for (int c = 0; c < NC; c++)
          for (int ky = 0; ky < int'(cfg.kh); ky++)
            for (int kx = 0; kx < int'(cfg.kw); kx++)
              s += longint'(ref_act[c][int'(cfg.act_base) + o * int'(cfg.stride) + ky * int'(cfg.row_step) + kx * int'(cfg.dilation)])
                 * longint'(ref_w[r][c][int'(cfg.w_base) + ky * int'(cfg.kw) + kx]);
        s = s >>> cfg.qf;
        if (cfg.acc_en) s += longint'(ref_out[r][~cfg.out_sel][int'(cfg.out_base) + o]);
        res[r][o] = sat16(s);
      end
    end
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < 4 * int'(cfg.n_og); o++) begin
        ref_out[r][cfg.out_sel][int'(cfg.out_base) + o] = res[r][o];
        known[r][cfg.out_sel][int'(cfg.out_base) + o] = 1;
      end
  endtask

  // store 'groups' output words of row r, section s, starting at sample
  // 'base', and compare them with the reference (start + wait + check)
  task automatic store_start(int r, int s, int base, int groups, int slot);
    dma_go(0, 1, EXT_OUT + 32'(slot * 8192), loc_out(r, s, base / 4), groups);
  endtask
  task automatic store_check(int r, int s, int base, int groups, int slot, string what);
    for (int g = 0; g < groups; g++) begin
      quad_t q;
      q = u_ext0.peek(EXT_OUT + 32'(slot * 8192 + g * 8));
      for (int l = 0; l < 4; l++)
        `CHECK(q[l] == ref_out[r][s][base + 4 * g + l],
               $sformatf("%s: row %0d sec %0d sample %0d is %0d, expected %0d", what, r, s,
                         base + 4 * g + l, q[l], ref_out[r][s][base + 4 * g + l]))
    end
  endtask

`endif
