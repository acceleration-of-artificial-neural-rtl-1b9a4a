// Testbench of mbconv_pu: random multiply-accumulate sequences of random
// length (the first step of each clears the accumulator), with enable gaps,
// random shifts and operands large enough to drive both the 32-bit
// accumulator and the 16-bit output into saturation. The output is checked
// after every accumulated product against a reference accumulator; one
// product is accumulated per enabled cycle.
`include "tb_util.svh"
module tb_mbconv_pu;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(200000)

  logic rst_n = 0, en = 0, clr = 0;
  logic signed [15:0] a = '0, w = '0, y;
  logic [4:0] qf = '0;
  mbconv_pu dut (.*);

  longint acc = 0;
  int n_acc_sat = 0, n_y_sat = 0;
  function automatic logic signed [15:0] out_of(longint v, int q);
    longint s;
    s = v >>> q;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return -16'sh8000;
    return 16'(s);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int seq = 0; seq < 400; seq++) begin
      int len, big;
      len = 1 + $urandom % 12;
      big = (seq % 4 == 0);
      qf = 5'($urandom % 20);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        en = 1; clr = (i == 0);
        a = big ? (($urandom % 2) ? 16'sh7fff : -16'sh7fff) : 16'($urandom);
        w = big ? 16'sh7fff : 16'($urandom);
        if (!big && $urandom % 2) begin a = a >>> 6; w = w >>> 6; end
        acc = (clr ? 0 : acc) + longint'(a) * longint'(w);
        if (acc > 64'sd2147483647) begin acc = 64'sd2147483647; n_acc_sat++; end
        if (acc < -64'sd2147483648) begin acc = -64'sd2147483648; n_acc_sat++; end
        @(negedge clk);
        en = 0;
        if ($urandom % 3 == 0) begin a = 16'($urandom); repeat ($urandom % 3) @(negedge clk); end
        `CHECK(y == out_of(acc, int'(qf)), $sformatf("seq %0d step %0d: y %0d, expected %0d", seq, i, y, out_of(acc, int'(qf))))
        if (y inside {16'sh7fff, -16'sh8000}) n_y_sat++;
      end
    end
    `CHECK(n_acc_sat > 0 && n_y_sat > 0, "saturation never exercised")
    `TB_FINISH
  end
endmodule
