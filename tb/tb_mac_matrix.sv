// Testbench of mac_matrix (3 rows x 5 columns): random windows of random
// length; every SoP's four sums are compared with a reference that uses
// the column's samples and the SoP's own weights.
`include "tb_util.svh"
module tb_mac_matrix;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  localparam int R = 3, C = 5;
  logic rst_n = 0, in_valid = 0, in_first = 0, in_last = 0, out_valid;
  quad_t [C-1:0] act;
  sample_t [R-1:0][C-1:0] weight;
  acc_quad_t [R-1:0][C-1:0] out_acc;

  mac_matrix #(.N_ROWS(R), .N_COLS(C)) dut (.*);

  longint ref_s [R][C][4];
  int n_results = 0;

  initial begin
    act = '0; weight = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      int k;
      k = 1 + ($urandom % 9);
      foreach (ref_s[r, c, l]) ref_s[r][c][l] = 0;
      for (int t = 0; t < k; t++) begin
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == k - 1);
        for (int c = 0; c < C; c++) for (int l = 0; l < 4; l++) act[c][l] = sample_t'($urandom);
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) weight[r][c] = sample_t'($urandom);
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int l = 0; l < 4; l++)
          ref_s[r][c][l] += longint'(act[c][l]) * longint'(weight[r][c]);
      end
      @(negedge clk); in_valid = 0; in_last = 0;
      @(negedge clk);
      `CHECK(out_valid, "out_valid missing two cycles after the last tap")
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int l = 0; l < 4; l++)
        `CHECK(out_acc[r][c][l] == ACC_W'(ref_s[r][c][l]), $sformatf("SoP %0d,%0d lane %0d", r, c, l))
      n_results++;
    end
    `TB_FINISH
  end
endmodule
