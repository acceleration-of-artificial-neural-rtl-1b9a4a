// ext_mem_model: behavioural model of the off-chip memory behind one
// high-performance port, used by the testbenches.
//
// Accepts requests under valid/ready. 'ready' is redrawn at random every
// cycle with probability ready_pct percent, so the masters see
// back-pressure. A write stores its 64-bit word at once; a read returns its
// word LAT cycles after acceptance, in order, one word per cycle at most.
// Words never written read back as a fixed function of their address.
// Memory contents are kept in a sparse array indexed by word address and
// can be written or read directly by the testbench (mem, peek). Counters
// report accepted reads and writes and the number of stalled request cycles.
module ext_mem_model
  import neuraghe_pkg::*;
#(
  parameter int unsigned LAT = 6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ext_req_t req,
  output ext_rsp_t rsp
);
  int unsigned ready_pct = 100;
  int unsigned n_reads = 0, n_writes = 0, n_stalls = 0;
  logic [EXT_DW-1:0] mem [logic [EXT_AW-4:0]];

  function automatic logic [EXT_DW-1:0] peek(logic [EXT_AW-1:0] byte_addr);
    logic [EXT_AW-4:0] a;
    a = byte_addr[EXT_AW-1:3];
    if (mem.exists(a)) return mem[a];
    return {~32'(a), 32'(a) ^ 32'h5a5a_0000};
  endfunction

  longint unsigned cyc = 0;
  longint unsigned due_q [$];
  logic [EXT_DW-1:0] data_q [$];

  initial rsp = '0;
  always @(negedge clk) rsp.ready = ($urandom % 100) < ready_pct;

  always @(posedge clk) begin
    cyc++;
    rsp.rvalid <= 1'b0;
    if (!rst_n) begin
      due_q.delete(); data_q.delete();
    end else begin
      if (due_q.size() > 0 && due_q[0] <= cyc) begin
        rsp.rvalid <= 1'b1;
        rsp.rdata  <= data_q.pop_front();
        void'(due_q.pop_front());
      end
      if (req.valid && !rsp.ready) n_stalls++;
      if (req.valid && rsp.ready) begin
        if (req.we) begin
          mem[req.addr[EXT_AW-1:3]] = req.wdata;
          n_writes++;
        end else begin
          due_q.push_back(cyc + LAT);
          data_q.push_back(peek(req.addr));
          n_reads++;
        end
      end
    end
  end
endmodule
