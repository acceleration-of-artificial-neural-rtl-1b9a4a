// Testbench of weight_bank: 64-bit word writes on port A, 16-bit reads on
// port B compared with a reference array, including the read latency.
`include "tb_util.svh"
module tb_weight_bank;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(100000)
  logic a_we = 0, b_en = 0;
  logic [7:0] a_addr = '0;
  logic [3:0][15:0] a_wdata = '0;
  logic [9:0] b_addr = '0;
  logic [15:0] b_rdata;
  logic [15:0] ref_mem [1024];

  weight_bank dut (.*);

  initial begin
    for (int wd = 0; wd < 256; wd++) begin
      @(negedge clk); a_we = 1; a_addr = 8'(wd);
      for (int i = 0; i < 4; i++) begin a_wdata[i] = 16'($urandom); ref_mem[wd * 4 + i] = a_wdata[i]; end
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom % 1024;
      @(negedge clk); b_en = 1; b_addr = 10'(a);
      @(negedge clk); b_en = 0;
      `CHECK(b_rdata == ref_mem[a], $sformatf("weight %0d: %h vs %h", a, b_rdata, ref_mem[a]))
    end
    `TB_FINISH
  end
endmodule
