// partial_source: partial-result source of the Convolution Engine.
//
// When a convolution accumulates over several engine runs, each row's
// shift adder needs the partial result that an earlier run left in the
// output memory. For each output group this block issues one read of four
// consecutive samples at out_base + 4*og, one per 'issue' strobe (the
// engine strobes it so that the data arrive together with the SoP sums).
// The document names the block and its four-samples-per-cycle ports; the
// addressing is this design's.
// Timing: combinational request (rd_en = issue), data one cycle later from
// the registered memory read.
module partial_source
  import neuraghe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SADDR_W-1:0] base,
  input  logic               issue,
  output logic               rd_en,
  output logic [SADDR_W-1:0] rd_addr
);
  logic [SADDR_W-1:0] ptr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ptr <= '0;
    else if (start)  ptr <= base;
    else if (issue)  ptr <= ptr + SADDR_W'(LANES);
  end
  assign rd_en   = issue;
  assign rd_addr = ptr;
endmodule
