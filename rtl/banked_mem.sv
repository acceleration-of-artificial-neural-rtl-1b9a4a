// banked_mem: one interleaved memory port of the CSP tightly-coupled data
// memory (an activation memory of one engine column, or one section of the
// output/partial-result memory of one engine row).
//
// The memory is made of NBANK independent dual-port banks of DEPTH words.
// Consecutive samples sit in consecutive banks (sample s -> bank s % NBANK,
// row s / NBANK), as the document describes. The engine side (port B) reads
// or writes LANES samples per cycle at addr, addr+stride, addr+2*stride, ...
// With NBANK = 8 and LANES = 4 these always fall into distinct banks for
// strides up to 3, so no cycle is ever lost to a bank conflict; an assertion
// checks that property. The DMA side (port A) moves one aligned 64-bit word
// (LANES consecutive samples) per cycle. Both ports have a registered read:
// data appear the cycle after the request. A write from both ports to the
// same sample in the same cycle keeps the engine's value (this design's
// choice; the document does not say).
module banked_mem #(
  parameter int unsigned NBANK = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LANES = 4,
  parameter int unsigned W     = 16,
  localparam int unsigned SAW  = $clog2(NBANK * DEPTH),
  localparam int unsigned AWW  = SAW - $clog2(LANES)
) (
  input  logic                      clk,
  // port A: DMA, one aligned word of LANES consecutive samples
  input  logic                      a_en,
  input  logic                      a_we,
  input  logic [AWW-1:0]            a_addr,
  input  logic [LANES-1:0][W-1:0]   a_wdata,
  output logic [LANES-1:0][W-1:0]   a_rdata,
  // port B: engine, LANES strided samples
  input  logic                      b_en,
  input  logic                      b_we,
  input  logic [SAW-1:0]            b_addr,
  input  logic [1:0]                b_stride,
  input  logic [LANES-1:0][W-1:0]   b_wdata,
  output logic [LANES-1:0][W-1:0]   b_rdata
);
  localparam int unsigned BW = $clog2(NBANK);
  localparam int unsigned RW = $clog2(DEPTH);

  // per-lane sample addresses on both ports
  logic [LANES-1:0][SAW-1:0] b_lane_addr, a_lane_addr;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      b_lane_addr[l] = b_addr + SAW'(l) * SAW'(b_stride);
      a_lane_addr[l] = {a_addr, ($clog2(LANES))'(l)};
    end
  end

  // route lanes to banks
  logic [NBANK-1:0]          a_hit, b_hit;
  logic [NBANK-1:0][RW-1:0]  a_row, b_row;
  logic [NBANK-1:0][W-1:0]   a_wd, b_wd;
  always_comb begin
    a_hit = '0; b_hit = '0;
    a_row = '0; b_row = '0;
    a_wd  = '0; b_wd  = '0;
    for (int l = 0; l < LANES; l++) begin
      if (a_en) begin
        a_hit[a_lane_addr[l][BW-1:0]] = 1'b1;
        a_row[a_lane_addr[l][BW-1:0]] = a_lane_addr[l][SAW-1:BW];
        a_wd [a_lane_addr[l][BW-1:0]] = a_wdata[l];
      end
      if (b_en) begin
        b_hit[b_lane_addr[l][BW-1:0]] = 1'b1;
        b_row[b_lane_addr[l][BW-1:0]] = b_lane_addr[l][SAW-1:BW];
        b_wd [b_lane_addr[l][BW-1:0]] = b_wdata[l];
      end
    end
  end

  // the banks
  logic [NBANK-1:0][W-1:0] a_q, b_q;
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (a_hit[b] && a_we) mem[a_row[b]] <= a_wd[b];
      if (b_hit[b] && b_we) mem[b_row[b]] <= b_wd[b];
      if (a_hit[b]) a_q[b] <= mem[a_row[b]];
      if (b_hit[b]) b_q[b] <= mem[b_row[b]];
    end
  end

  // lane -> bank selection, registered with the read
  logic [LANES-1:0][BW-1:0] a_sel_q, b_sel_q;
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (a_en) a_sel_q[l] <= a_lane_addr[l][BW-1:0];
      if (b_en) b_sel_q[l] <= b_lane_addr[l][BW-1:0];
    end
  end
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      a_rdata[l] = a_q[a_sel_q[l]];
      b_rdata[l] = b_q[b_sel_q[l]];
    end
  end

  // Two lanes may share a bank only when they address the same sample.
  for (genvar i = 0; i < LANES; i++) begin : g_chk_i
    for (genvar j = i + 1; j < LANES; j++) begin : g_chk_j
      a_conflict : assert property (@(posedge clk)
        b_en && (b_lane_addr[i][BW-1:0] == b_lane_addr[j][BW-1:0])
        |-> b_lane_addr[i] == b_lane_addr[j])
        else $error("banked_mem: lanes %0d and %0d collide on bank %0d", i, j, b_lane_addr[i][BW-1:0]);
    end
  end
endmodule
