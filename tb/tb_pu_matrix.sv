// Testbench of pu_matrix (3 x 2 units): every unit gets its own random
// operands each cycle under a shared enable/clear/shift, and all outputs
// are compared with per-unit reference accumulators. One product per unit
// per enabled cycle.
`include "tb_util.svh"
module tb_pu_matrix;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  localparam int R = 3, C = 2;

  logic rst_n = 0, en = 0, clr = 0;
  logic [4:0] qf = '0;
  logic signed [R-1:0][C-1:0][15:0] a = '0, w = '0, y;
  pu_matrix #(.N_ROWS(R), .N_COLS(C)) dut (.*);

  longint acc [R][C];
  function automatic logic signed [15:0] out_of(longint v, int q);
    longint s;
    s = v >>> q;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return -16'sh8000;
    return 16'(s);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int seq = 0; seq < 200; seq++) begin
      int len;
      len = 1 + $urandom % 16;
      qf = 5'($urandom % 16);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        en = ($urandom % 4 != 0) || i == 0; clr = (i == 0);
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            a[r][c] = 16'($urandom) >>> 3; w[r][c] = 16'($urandom) >>> 3;
            if (en) acc[r][c] = (clr ? 0 : acc[r][c]) + longint'(a[r][c]) * longint'(w[r][c]);
          end
        @(negedge clk);
        en = 0; clr = 0;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            `CHECK(y[r][c] == out_of(acc[r][c], int'(qf)), $sformatf("unit %0d,%0d: %0d vs %0d", r, c, y[r][c], out_of(acc[r][c], int'(qf))))
      end
    end
    `TB_FINISH
  end
endmodule
