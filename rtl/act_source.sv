// act_source: programmable activation source of the Convolution Engine.
//
// After 'start' it walks one convolution run and issues, every cycle
// without bubbles, the base address of the four neighbouring windows to
// the activation memories (all columns use the same pattern; each column's
// memory holds a different input feature). Loop order, outer to inner:
// output group og (4 windows), kernel row ky, kernel tap kx:
//   addr = act_base + og*4*stride + ky*row_step + kx*dilation
// and the memory adds lane*stride for the four windows. Offsets are kept as
// running sums, so no multiplier is needed. 'first' marks tap (0,0) and
// 'last' the final tap of a window, for the SoP accumulators. The document
// gives the programmability (stride, dilation, kernel and 2-D sections);
// the loop order and address formula are this design's.
// Timing: rd_* are registered; start is taken at a clock edge and the first
// request is presented after the next edge, i.e. two cycles after start is
// raised; a run of n_og*kh*kw requests ends with done_issue high for one
// cycle together with the final request.
module act_source
  import neuraghe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ce_cfg_t            cfg,
  output logic               busy,
  output logic               rd_en,
  output logic [SADDR_W-1:0] rd_addr,
  output logic [1:0]         rd_stride,
  output logic               rd_first,
  output logic               rd_last,
  output logic               done_issue
);
  logic [11:0]        og;
  logic [5:0]         ky;
  logic [9:0]         kx;
  logic [SADDR_W-1:0] og_off, ky_off, kx_off;
  ce_cfg_t            c;

  wire end_kx = (kx == c.kw - 10'd1);
  wire end_ky = (ky == c.kh - 6'd1);
  wire end_og = (og == c.n_og - 12'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; rd_en <= 1'b0; rd_first <= 1'b0; rd_last <= 1'b0;
      done_issue <= 1'b0; rd_addr <= '0; rd_stride <= 2'd1;
      og <= '0; ky <= '0; kx <= '0; og_off <= '0; ky_off <= '0; kx_off <= '0;
      c <= '0;
    end else begin
      done_issue <= 1'b0;
      rd_en      <= 1'b0;
      if (start && !busy) begin
        c <= cfg;
        busy <= 1'b1;
        og <= '0; ky <= '0; kx <= '0;
        og_off <= '0; ky_off <= '0; kx_off <= '0;
      end else if (busy) begin
        rd_en     <= 1'b1;
        rd_addr   <= c.act_base + og_off + ky_off + kx_off;
        rd_stride <= c.stride;
        rd_first  <= (ky == '0) && (kx == '0);
        rd_last   <= end_kx && end_ky;
        if (!end_kx) begin
          kx <= kx + 10'd1; kx_off <= kx_off + SADDR_W'(c.dilation);
        end else begin
          kx <= '0; kx_off <= '0;
          if (!end_ky) begin
            ky <= ky + 6'd1; ky_off <= ky_off + c.row_step;
          end else begin
            ky <= '0; ky_off <= '0;
            og_off <= og_off + SADDR_W'({c.stride, 2'b00});
            og <= og + 12'd1;
            if (end_og) begin
              busy <= 1'b0;
              done_issue <= 1'b1;
            end
          end
        end
      end
    end
  end

  a_cfg_ok : assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy |-> cfg.kw != 0 && cfg.kh != 0 && cfg.n_og != 0 && cfg.stride != 0)
    else $error("act_source: kernel size, output groups and stride must be non-zero");
endmodule
