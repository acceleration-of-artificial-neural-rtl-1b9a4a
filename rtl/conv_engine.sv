// conv_engine: the Convolution Engine (CE) of the CSP.
//
// One 'start' runs one programmed convolution step: the activation source
// streams four neighbouring windows of every input feature (one per
// column), the weight source streams each SoP's kernel, the MAC matrix
// accumulates every window over kw*kh cycles, each row's shift adder sums
// its columns (plus an earlier partial result when cfg.acc_en) and the
// output sink writes four output samples per row per output group. The
// engine therefore produces the contribution of N_COLS input features to
// N_ROWS output features, for 4*n_og consecutive output samples, in
// n_og*kw*kh cycles plus a fixed pipeline latency, whatever the stride or
// dilation: this is the document's "no overhead" property.
//
// Memories are outside the engine (in the CSP) and accessed through
// registered-read ports. Pipeline (cycle numbers relative to a request T):
//   T   source requests (activation and weight, same cycle)
//   T+1 samples and weights reach the SoPs
//   T+2 products registered; a window's last tap also issues the
//       partial-result read
//   T+3 SoP sums and partial results reach the shift adders
//   T+4 saturated results written by the output sink
// Latency from start to done: n_og*kw*kh + 6 cycles. Partial results are
// read from output section ~out_sel and results written to section
// out_sel, so successive runs can accumulate by swapping sections (this
// ping-pong use of the two output sections is this design's choice).
module conv_engine
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_ROWS = 4,
  parameter int unsigned N_COLS = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  ce_cfg_t                           cfg,
  output logic                              busy,
  output logic                              done,
  // activation memories, one per column (shared request)
  output logic                              act_en,
  output logic [SADDR_W-1:0]                act_addr,
  output logic [1:0]                        act_stride,
  input  quad_t   [N_COLS-1:0]              act_rdata,
  // weight banks, one per SoP (shared request)
  output logic                              w_en,
  output logic [WADDR_W-1:0]                w_addr,
  input  sample_t [N_ROWS-1:0][N_COLS-1:0]  w_rdata,
  // partial-result read, one memory per row (shared request)
  output logic                              ps_en,
  output logic [SADDR_W-1:0]                ps_addr,
  output logic                              ps_sec,
  input  quad_t   [N_ROWS-1:0]              ps_rdata,
  // output write, one memory per row (shared address)
  output logic                              out_we,
  output logic [SADDR_W-1:0]                out_addr,
  output logic                              out_sec,
  output quad_t   [N_ROWS-1:0]              out_wdata
);
  ce_cfg_t c;
  logic    src_busy, done_issue;
  logic    first0, last0;
  logic    v1, f1, l1, v2, l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else if (start && !busy) c <= cfg;
  end

  act_source u_act_src (
    .clk, .rst_n, .start(start && !busy), .cfg,
    .busy(src_busy), .rd_en(act_en), .rd_addr(act_addr), .rd_stride(act_stride),
    .rd_first(first0), .rd_last(last0), .done_issue
  );

  weight_source u_w_src (
    .clk, .rst_n, .start(start && !busy), .cfg,
    .rd_en(w_en), .rd_addr(w_addr)
  );

  // tags follow the data through the memory read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; v2 <= 1'b0; l2 <= 1'b0;
    end else begin
      v1 <= act_en; f1 <= first0; l1 <= last0;
      v2 <= v1;     l2 <= l1;
    end
  end

  logic      mm_valid;
  acc_quad_t [N_ROWS-1:0][N_COLS-1:0] mm_acc;
  mac_matrix #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_matrix (
    .clk, .rst_n, .in_valid(v1), .in_first(f1), .in_last(l1),
    .act(act_rdata), .weight(w_rdata),
    .out_valid(mm_valid), .out_acc(mm_acc)
  );

  partial_source u_ps_src (
    .clk, .rst_n, .start(start && !busy), .base(cfg.out_base),
    .issue(v2 && l2 && c.acc_en), .rd_en(ps_en), .rd_addr(ps_addr)
  );
  assign ps_sec = ~c.out_sel;

  logic [N_ROWS-1:0] sa_valid;
  for (genvar r = 0; r < N_ROWS; r++) begin : g_sa
    shift_adder #(.N_COLS(N_COLS)) u_sa (
      .clk, .rst_n, .in_valid(mm_valid), .acc(mm_acc[r]), .partial(ps_rdata[r]),
      .acc_en(c.acc_en), .qf(c.qf), .out_valid(sa_valid[r]), .out(out_wdata[r])
    );
  end

  logic [11:0] n_written;
  output_sink u_sink (
    .clk, .rst_n, .start(start && !busy), .base(cfg.out_base),
    .in_valid(sa_valid[0]), .wr_en(out_we), .wr_addr(out_addr), .count(n_written)
  );
  assign out_sec = c.out_sel;

  // run control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) busy <= 1'b1;
      else if (busy && !src_busy && !done_issue && n_written == c.n_og) begin
        busy <= 1'b0; done <= 1'b1;
      end
    end
  end
endmodule
