// weight_bank: the weight memory of one SoP unit (one RAMB18, 1024 x 16).
//
// The weight DMA writes one 64-bit word (4 consecutive kernel elements) per
// cycle on port A; the weight source reads one 16-bit kernel element per
// cycle on port B, with the data registered (available the next cycle).
// One bank per SoP follows the document's memory budget (Eq. 3.4, first
// term); the asymmetric 64/16-bit port widths are this design's choice.
module weight_bank #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16,
  parameter int unsigned WPW   = 4,        // weights per DMA word
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned AWW  = AW - $clog2(WPW)
) (
  input  logic                    clk,
  input  logic                    a_we,
  input  logic [AWW-1:0]          a_addr,
  input  logic [WPW-1:0][W-1:0]   a_wdata,
  input  logic                    b_en,
  input  logic [AW-1:0]           b_addr,
  output logic [W-1:0]            b_rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_we)
      for (int i = 0; i < WPW; i++) mem[{a_addr, ($clog2(WPW))'(i)}] <= a_wdata[i];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
