// Testbench of banked_mem: fills the memory through the DMA port, reads it
// back through the engine port with random addresses and strides 1..3
// (checking the four lanes against a reference array and the one-cycle
// read latency), writes through the engine port and reads back through the
// DMA port.
`include "tb_util.svh"
module tb_banked_mem;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(200000)

  localparam int NB = 8, D = 64, L = 4, W = 16;
  localparam int SAW = $clog2(NB * D), AWW = SAW - 2;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AWW-1:0] a_addr = '0;
  logic [SAW-1:0] b_addr = '0;
  logic [1:0] b_stride = 2'd1;
  logic [L-1:0][W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] ref_mem [NB * D];

  banked_mem #(.NBANK(NB), .DEPTH(D), .LANES(L), .W(W)) dut (.*);

  initial begin
    // fill through port A
    for (int wd = 0; wd < NB * D / L; wd++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AWW'(wd);
      for (int l = 0; l < L; l++) begin
        a_wdata[l] = W'($urandom);
        ref_mem[wd * L + l] = a_wdata[l];
      end
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // strided reads through port B
    for (int i = 0; i < 400; i++) begin
      int s, base;
      s = 1 + ($urandom % 3);
      base = $urandom % (NB * D - 3 * s);
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = SAW'(base); b_stride = 2'(s);
      @(negedge clk);
      b_en = 0;
      for (int l = 0; l < L; l++)
        `CHECK(b_rdata[l] == ref_mem[base + l * s],
               $sformatf("B read base %0d stride %0d lane %0d: %h vs %h", base, s, l, b_rdata[l], ref_mem[base + l * s]))
    end
    // writes through port B (stride 1, as the output sink uses it)
    for (int i = 0; i < 50; i++) begin
      int base;
      base = 4 * ($urandom % (NB * D / 4));
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = SAW'(base); b_stride = 2'd1;
      for (int l = 0; l < L; l++) begin
        b_wdata[l] = W'($urandom);
        ref_mem[base + l] = b_wdata[l];
      end
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // read everything back through port A
    for (int wd = 0; wd < NB * D / L; wd++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = AWW'(wd);
      @(negedge clk); a_en = 0;
      for (int l = 0; l < L; l++)
        `CHECK(a_rdata[l] == ref_mem[wd * L + l], $sformatf("A read word %0d lane %0d", wd, l))
    end
    `TB_FINISH
  end
endmodule
