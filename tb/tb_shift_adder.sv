// Testbench of shift_adder (6 columns): random accumulator values, shift
// amounts and partial results, with and without accumulation, including
// values that saturate in both directions; compared with a reference.
`include "tb_util.svh"
module tb_shift_adder;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  localparam int C = 6;
  logic rst_n = 0, in_valid = 0, acc_en = 0, out_valid;
  acc_quad_t [C-1:0] acc;
  quad_t partial, out;
  logic [5:0] qf;
  int n_sat = 0;

  shift_adder #(.N_COLS(C)) dut (.*);

  function automatic sample_t ref_f(longint s, int q, logic en, sample_t p);
    longint v;
    v = s >>> q;
    if (en) v += longint'(p);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return sample_t'(v);
  endfunction

  initial begin
    acc = '0; partial = '0; qf = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      sample_t e[4];
      @(negedge clk);
      in_valid = 1; acc_en = 1'($urandom); qf = 6'($urandom % 20);
      for (int l = 0; l < 4; l++) begin
        longint s;
        s = 0;
        partial[l] = sample_t'($urandom);
        for (int c = 0; c < C; c++) begin
          acc[c][l] = acc_t'($signed(32'($urandom)) >>> ($urandom % 16));
          s += longint'(acc[c][l]);
        end
        e[l] = ref_f(s, int'(qf), acc_en, partial[l]);
        if (e[l] == 16'sh7fff || e[l] == -16'sh8000) n_sat++;
      end
      @(negedge clk); in_valid = 0;
      `CHECK(out_valid, "out_valid missing")
      for (int l = 0; l < 4; l++) `CHECK(out[l] == e[l], $sformatf("lane %0d: %0d vs %0d", l, out[l], e[l]))
    end
    `CHECK(n_sat > 0, "saturation never exercised")
    `TB_FINISH
  end
endmodule
