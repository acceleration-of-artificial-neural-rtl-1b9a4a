// Testbench of sop_unit: streams windows of random length (1..20 taps)
// back to back, compares the four sums with a reference computed in the
// testbench and checks that each result appears exactly two cycles after
// the window's last tap.
`include "tb_util.svh"
module tb_sop_unit;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  logic rst_n = 0, in_valid = 0, in_first = 0, in_last = 0, out_valid;
  sample_t [3:0] act;
  sample_t weight;
  acc_t [3:0] out_acc;

  sop_unit dut (.*);

  longint exp_q[4][$];
  int     exp_cycle[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    `CHECK(exp_cycle.size() > 0, "unexpected result")
    if (exp_cycle.size() > 0) begin
      `CHECK(cyc == exp_cycle.pop_front(), "result latency is not 2 cycles")
      for (int l = 0; l < 4; l++) begin
        longint e;
        e = exp_q[l].pop_front();
        `CHECK(out_acc[l] == ACC_W'(e), $sformatf("lane %0d: %0d vs %0d", l, out_acc[l], e))
      end
    end
  end

  initial begin
    act = '0; weight = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 60; w++) begin
      int k;
      longint s[4];
      k = 1 + ($urandom % 20);
      s = '{0, 0, 0, 0};
      for (int t = 0; t < k; t++) begin
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == k - 1);
        weight = sample_t'($urandom);
        if (w % 7 == 0) weight = 16'sh7fff;
        for (int l = 0; l < 4; l++) begin
          act[l] = sample_t'($urandom);
          if (w % 7 == 0) act[l] = -16'sh8000;
          s[l] += longint'(act[l]) * longint'(weight);
        end
        if (t == k - 1) begin
          for (int l = 0; l < 4; l++) exp_q[l].push_back(s[l]);
          exp_cycle.push_back(cyc + 2);
        end
      end
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    repeat (6) @(negedge clk);
    `CHECK(exp_cycle.size() == 0, "results missing")
    `TB_FINISH
  end
endmodule
