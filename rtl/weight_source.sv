// weight_source: programmable weight source of the Convolution Engine.
//
// Runs in lock-step with act_source and issues one kernel element address
// per cycle to every weight bank (each SoP has its own bank holding its own
// kernel, stored row-major from w_base). The kernel is replayed from w_base
// for every output group, so weights are reused across all windows of the
// run. The document says only that weight sources are programmed per layer;
// the linear kernel layout is this design's choice.
// Timing: registered outputs, first request two cycles after start, same
// cycle as the activation request of the same tap.
module weight_source
  import neuraghe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ce_cfg_t            cfg,
  output logic               rd_en,
  output logic [WADDR_W-1:0] rd_addr
);
  logic [15:0]        taps, tap;
  logic [11:0]        og, n_og;
  logic [WADDR_W-1:0] base, ptr;
  logic               busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; rd_en <= 1'b0; rd_addr <= '0;
      taps <= '0; tap <= '0; og <= '0; n_og <= '0; base <= '0; ptr <= '0;
    end else begin
      rd_en <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        taps <= 16'(cfg.kw * cfg.kh);
        n_og <= cfg.n_og;
        base <= cfg.w_base; ptr <= cfg.w_base;
        tap <= '0; og <= '0;
      end else if (busy) begin
        rd_en   <= 1'b1;
        rd_addr <= ptr;
        if (tap != taps - 16'd1) begin
          tap <= tap + 16'd1; ptr <= ptr + WADDR_W'(1);
        end else begin
          tap <= '0; ptr <= base; og <= og + 12'd1;
          if (og == n_og - 12'd1) busy <= 1'b0;
        end
      end
    end
  end
endmodule
