// Reference model of a group of SNE clusters for the testbenches, included
// inside a testbench module that defines NS (slices) and NCL (clusters per
// slice) and declares checks/failures. Each cluster holds 64 leaky
// integrate-and-fire neurons on an 8x8 output tile and a 3x3 kernel per
// input channel. Output spikes of different clusters may leave in any
// order, so expected spikes are kept as a multiset and every spike seen on
// the output must match one of them.
`ifndef SNE_MODEL_SVH
`define SNE_MODEL_SVH

  int        m_v   [NS][NCL][64];
  int        m_w   [NS][NCL][144];
  sne_ccfg_t m_cfg [NS][NCL];
  int        m_expected [logic [31:0]];
  int        m_n_fired = 0, m_n_pending = 0;

  function automatic int m_sat8(int x);
    return x > 127 ? 127 : (x < -128 ? -128 : x);
  endfunction

  function automatic void m_reset();
    foreach (m_v[s, c, n]) m_v[s][c][n] = 0;
  endfunction

  function automatic void m_event(sne_event_t e, logic [NS-1:0] en);
    for (int s = 0; s < NS; s++) if (en[s])
      for (int c = 0; c < NCL; c++) begin
        sne_ccfg_t k;
        k = m_cfg[s][c];
        if (e.op == OP_SPIKE) begin
          for (int t = 0; t < 9; t++) begin
            int ox, oy;
            ox = int'(e.x) - t % 3 + 1 - int'(k.tile_x);
            oy = int'(e.y) - t / 3 + 1 - int'(k.tile_y);
            if (ox >= 0 && ox < 8 && oy >= 0 && oy < 8)
              m_v[s][c][oy * 8 + ox] = m_sat8(m_v[s][c][oy * 8 + ox] + m_w[s][c][int'(e.ch) * 9 + t]);
          end
        end else if (e.op == OP_TSTEP) begin
          for (int n = 0; n < 64; n++) begin
            int lv;
            lv = m_v[s][c][n] - int'(k.leak);
            if (lv < -128) lv = -128;
            if (lv >= int'($signed(k.vth))) begin
              sne_event_t o;
              o.x = k.tile_x + 8'(n % 8); o.y = k.tile_y + 8'(n / 8);
              o.t = e.t; o.op = OP_SPIKE; o.ch = k.out_ch;
              if (m_expected.exists(o)) m_expected[o]++; else m_expected[o] = 1;
              m_n_fired++; m_n_pending++;
              m_v[s][c][n] = 0;
            end else m_v[s][c][n] = lv;
          end
        end
      end
  endfunction

  // account for one spike seen on the output
  function automatic void m_seen(sne_event_t o);
    `CHECK(m_expected.exists(o) && m_expected[o] > 0, $sformatf("unexpected output spike %h", o))
    if (m_expected.exists(o) && m_expected[o] > 0) begin
      m_expected[o]--;
      m_n_pending--;
    end
  endfunction

`endif
