// Testbench of mbconv_engine at a reduced size (4 channels x 3 pixels per
// batch, 3-tap depthwise window, up to 6 input channels): random weights
// and shifts, streams of random batches with random input gaps and output
// stalls, the depthwise history carried across batches and cleared between
// streams. Every output batch is compared with a reference of the three
// phases. Timing, with no gaps or stalls: the first batch is taken at the
// output c_in + KS + N_ROWS + 6 clock edges after the edge that accepted
// it at the input, and the following
// ones every max(c_in, KS, N_ROWS) + 2 cycles (the slowest phase sets the
// rate because the three matrices work on different batches at once).
`include "tb_util.svh"
module tb_mbconv_engine;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(400000)
  localparam int NR = 4, NC = 3, KS = 3, CM = 6;

  logic rst_n = 0, hist_clr = 0, w_we = 0;
  logic [2:0] c_in = 3'd4;
  logic [2:0][4:0] qf = '0;
  logic [1:0] w_phase = '0;
  logic [1:0] w_row = '0;
  logic [2:0] w_idx = '0;
  logic signed [15:0] w_data = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [NC-1:0][CM-1:0][15:0] in_batch = '0;
  logic signed [NC-1:0][NR-1:0][15:0] out_batch;

  mbconv_engine #(.N_ROWS(NR), .N_COLS(NC), .KS(KS), .C_IN_MAX(CM)) dut (.*);

  int w1 [NR][CM], wd [NR][KS], w2 [NR][NR];
  int ehist [KS-1][NR];
  typedef logic signed [NC-1:0][NR-1:0][15:0] ob_t;
  ob_t exp_q [$];

  function automatic int sat(longint v, int q);
    longint s;
    s = v >>> q;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  function automatic void model(logic signed [NC-1:0][CM-1:0][15:0] b);
    int e [NC][NR], d [NC][NR];
    ob_t o;
    for (int p = 0; p < NC; p++)
      for (int r = 0; r < NR; r++) begin
        longint s;
        s = 0;
        for (int i = 0; i < int'(c_in); i++) s += longint'($signed(b[p][i])) * w1[r][i];
        e[p][r] = sat(s, int'(qf[0]));
      end
    for (int p = 0; p < NC; p++)
      for (int r = 0; r < NR; r++) begin
        longint s;
        s = 0;
        for (int k = 0; k < KS; k++) begin
          int q;
          q = p + k - (KS - 1);
          s += longint'(q >= 0 ? e[q][r] : ehist[q + KS - 1][r]) * wd[r][k];
        end
        d[p][r] = sat(s, int'(qf[1]));
      end
    for (int p = 0; p < NC; p++)
      for (int r = 0; r < NR; r++) begin
        longint s;
        s = 0;
        for (int j = 0; j < NR; j++) s += longint'(d[p][j]) * w2[r][j];
        o[p][r] = 16'(sat(s, int'(qf[2])));
      end
    for (int j = 0; j < KS - 1; j++) for (int r = 0; r < NR; r++) ehist[j][r] = e[NC - (KS - 1) + j][r];
    exp_q.push_back(o);
  endfunction

  int n_out = 0, n_overlap = 0, n_stall = 0;
  int in_pct = 100, out_pct = 100;
  longint cyc = 0, t_in_first = -1, t_out[$];
  always @(posedge clk) begin
    cyc++;
    if (dut.u_pw1.en && dut.u_dw.en && dut.u_pw2.en) n_overlap++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      `CHECK(exp_q.size() > 0, "unexpected output batch")
      if (exp_q.size() > 0) begin
        ob_t e;
        e = exp_q.pop_front();
        `CHECK(out_batch == e, $sformatf("output batch %0d differs from the reference", n_out))
      end
      n_out++;
      t_out.push_back(cyc);
    end
  end
  always @(negedge clk) out_ready = ($urandom % 100) < out_pct;

  task automatic load_weights();
    for (int ph = 0; ph < 3; ph++)
      for (int r = 0; r < NR; r++)
        for (int i = 0; i < ((ph == 0) ? CM : (ph == 1) ? KS : NR); i++) begin
          @(negedge clk);
          w_we = 1; w_phase = 2'(ph); w_row = 2'(r); w_idx = 3'(i);
          w_data = $signed(16'($urandom)) >>> 9;
          if (ph == 0) w1[r][i] = int'(w_data); else if (ph == 1) wd[r][i] = int'(w_data); else w2[r][i] = int'(w_data);
        end
    @(negedge clk); w_we = 0;
  endtask

  task automatic stream(int nb, bit timed);
    longint t_acc;
    @(negedge clk);
    hist_clr = 1;
    foreach (ehist[j, r]) ehist[j][r] = 0;
    @(negedge clk); hist_clr = 0;
    t_out.delete();
    for (int b = 0; b < nb; b++) begin
      logic signed [NC-1:0][CM-1:0][15:0] bt;
      for (int p = 0; p < NC; p++) for (int i = 0; i < CM; i++) bt[p][i] = $signed(16'($urandom)) >>> 6;
      while (($urandom % 100) >= in_pct) @(negedge clk);
      in_valid = 1; in_batch = bt;
      while (!in_ready) @(negedge clk);
      if (b == 0) t_acc = cyc + 1;      // accepted at the coming edge
      model(bt);
      @(negedge clk); in_valid = 0;
    end
    while (exp_q.size() > 0) @(negedge clk);
    if (timed) begin
      int per;
      per = (int'(c_in) > KS ? int'(c_in) : KS);
      per = (per > NR ? per : NR) + 2;
      `CHECK(t_out[0] - t_acc == longint'(int'(c_in) + KS + NR + 6),
             $sformatf("first batch latency %0d, expected %0d", t_out[0] - t_acc, int'(c_in) + KS + NR + 6))
      for (int i = 1; i < t_out.size(); i++)
        `CHECK(t_out[i] - t_out[i-1] == per, $sformatf("c_in %0d: batch interval %0d, expected %0d", c_in, t_out[i] - t_out[i-1], per))
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      c_in = 3'(1 + $urandom % CM);
      if (s == 0) c_in = 3'd6;
      if (s == 1) c_in = 3'd1;
      qf[0] = 5'(3 + $urandom % 5); qf[1] = 5'(5 + $urandom % 4); qf[2] = 5'(5 + $urandom % 4);
      load_weights();
      in_pct = (s < 4) ? 100 : 30 + $urandom % 70;
      out_pct = (s < 4) ? 100 : 30 + $urandom % 70;
      stream(3 + $urandom % 8, s < 4);
    end
    `CHECK(n_overlap > 0 && n_stall > 0, $sformatf("mechanism missing: overlap %0d stalls %0d", n_overlap, n_stall))
    $display("batches %0d, cycles with all three phases busy %0d, output stalls %0d", n_out, n_overlap, n_stall);
    `TB_FINISH
  end
endmodule
