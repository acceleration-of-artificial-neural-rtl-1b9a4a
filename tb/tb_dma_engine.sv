// Testbench of dma_engine: random loads and stores of random length between
// an off-chip memory model (random back-pressure) and a local 64-bit word
// memory modelled here (one-cycle read latency, like the on-chip RAMs).
// Loaded words must land at the right local addresses and stored words at
// the right off-chip addresses, with nothing written outside the window.
// With an always-ready port a load must stream one word per cycle:
// len + port latency + 1 cycles from start to done.
`include "tb_util.svh"
module tb_dma_engine;
  import neuraghe_pkg::*;
  int checks = 0, failures = 0;
  `TB_CLOCK_AND_WATCHDOG(200000)
  localparam int LAT = 6;

  logic rst_n = 0, start = 0, dir = 0, busy, done;
  logic [EXT_AW-1:0] ext_addr = '0;
  logic [LOC_AW-1:0] loc_addr = '0;
  logic [15:0] len = '0;
  ext_req_t ext_req;
  ext_rsp_t ext_rsp;
  loc_req_t loc_req;
  logic [EXT_DW-1:0] loc_rdata;

  dma_engine dut (.*);
  ext_mem_model #(.LAT(LAT)) u_ext (.clk, .rst_n, .req(ext_req), .rsp(ext_rsp));

  logic [EXT_DW-1:0] loc_mem [4096];
  int loc_writes = 0;
  always @(posedge clk) begin
    if (loc_req.en && loc_req.we) begin loc_mem[loc_req.addr[11:0]] <= loc_req.wdata; loc_writes++; end
    if (loc_req.en && !loc_req.we) loc_rdata <= loc_mem[loc_req.addr[11:0]];
  end

  int n_bp_runs = 0;
  initial begin
    for (int i = 0; i < 4096; i++) loc_mem[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int cycles, w0;
      logic [EXT_DW-1:0] prev_mem [4096];
      logic [EXT_DW-1:0] exp_ext [];
      u_ext.ready_pct = (run % 3 == 0) ? 100 : 20 + $urandom % 70;
      dir = run % 2;
      len = 16'(1 + $urandom % 200);
      if (run == 4) len = 16'd0;
      ext_addr = {$urandom % 4096, 3'b000};
      loc_addr = LOC_AW'($urandom % (4096 - 200));
      prev_mem = loc_mem;
      exp_ext = new[len];
      for (int i = 0; i < int'(len); i++) exp_ext[i] = loc_mem[int'(loc_addr) + i];
      w0 = loc_writes;
      @(negedge clk); start = 1;
      @(posedge clk); cycles = 0;
      @(negedge clk); start = 0;
      while (!done && cycles < 20000) begin @(posedge clk); cycles++; #1; end
      `CHECK(done, $sformatf("run %0d never finished", run))
      @(negedge clk);
      `CHECK(!busy, "busy after done")
      if (dir == 0) begin
        for (int i = 0; i < 4096; i++) begin
          logic [EXT_DW-1:0] e;
          e = (i >= int'(loc_addr) && i < int'(loc_addr) + int'(len))
              ? u_ext.peek(ext_addr + EXT_AW'(8 * (i - int'(loc_addr)))) : prev_mem[i];
          if (loc_mem[i] !== e) `CHECK(0, $sformatf("run %0d load: local word %0d wrong", run, i))
        end
        `CHECK(loc_writes - w0 == int'(len), $sformatf("run %0d: %0d local writes for %0d words", run, loc_writes - w0, len))
        if (u_ext.ready_pct == 100 && len != 0)
          `CHECK(cycles == int'(len) + LAT + 1, $sformatf("run %0d: load of %0d words took %0d cycles", run, len, cycles))
      end else begin
        for (int i = 0; i < int'(len); i++)
          `CHECK(u_ext.peek(ext_addr + EXT_AW'(8 * i)) == exp_ext[i], $sformatf("run %0d store: word %0d wrong", run, i))
        `CHECK(loc_writes == w0, "store wrote local memory")
      end
      if (u_ext.ready_pct < 100) n_bp_runs++;
    end
    `CHECK(u_ext.n_stalls > 0 && n_bp_runs > 0, "back-pressure never happened")
    `TB_FINISH
  end
endmodule
