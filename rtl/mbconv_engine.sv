// mbconv_engine: convolution engine specialised for depthwise-separable
// and inverted-residual (MBConv) layers, for a 1-D stream of pixels.
//
// Three Processing Unit matrices, one per MBConv phase, work as a
// three-stage pipeline on batches of N_COLS pixels:
//   PW1 (expansion): e[p][r] = sum_i in[p][i] * W1[r][i]   (c_in cycles)
//   DW  (depthwise): d[p][r] = sum_k e[p-KS+1+k][r] * Wd[r][k]   (KS cycles)
//   PW2 (projection): o[p][r] = sum_j d[p][j] * W2[r][j]   (N_ROWS cycles)
// Each output is scaled by its phase's qf and saturated to 16 bits. A
// pointwise phase walks the channel depth of a whole batch of pixels at
// once, so every unit performs a full multiply-accumulate per cycle, which
// is the document's key idea for this engine; a batch moves to the next
// phase as soon as it is complete, so the three matrices work on three
// different batches at the same time. The depthwise phase is causal along
// the stream: it keeps the last KS-1 expanded pixels of the previous batch
// (cleared by hist_clr). Channel counts are limited to one matrix tile
// (expanded and output channels = N_ROWS, input channels <= C_IN_MAX).
// The document gives the three per-phase matrices, the depth-first
// pointwise processing and the phase pipeline; the 1-D causal depthwise
// window, the single channel tile, the buffers between phases and the
// weight port are this design's.
// Interfaces: in_valid/in_ready batch input, out_valid/out_ready batch
// output, weights written through w_we (phase 0 PW1, 1 DW, 2 PW2).
module mbconv_engine #(
  parameter int unsigned N_ROWS   = 12,
  parameter int unsigned N_COLS   = 9,
  parameter int unsigned KS       = 3,
  parameter int unsigned C_IN_MAX = 16,
  parameter int unsigned DW       = 16,
  localparam int unsigned CIW     = $clog2(C_IN_MAX + 1),
  localparam int unsigned IW      = $clog2((C_IN_MAX > N_ROWS) ? C_IN_MAX : N_ROWS)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [CIW-1:0]                         c_in,
  input  logic [2:0][4:0]                        qf,
  input  logic                                   hist_clr,
  input  logic                                   w_we,
  input  logic [1:0]                             w_phase,
  input  logic [$clog2(N_ROWS)-1:0]              w_row,
  input  logic [IW-1:0]                          w_idx,
  input  logic signed [DW-1:0]                   w_data,
  input  logic                                   in_valid,
  output logic                                   in_ready,
  input  logic signed [N_COLS-1:0][C_IN_MAX-1:0][DW-1:0] in_batch,
  output logic                                   out_valid,
  input  logic                                   out_ready,
  output logic signed [N_COLS-1:0][N_ROWS-1:0][DW-1:0]   out_batch
);
  typedef logic signed [DW-1:0] s_t;
  typedef s_t [N_ROWS-1:0][N_COLS-1:0] mat_t;

  // weights
  s_t w1 [N_ROWS][C_IN_MAX];
  s_t wd [N_ROWS][KS];
  s_t w2 [N_ROWS][N_ROWS];
  always_ff @(posedge clk) begin
    if (w_we) begin
      unique case (w_phase)
        2'd0: w1[w_row][w_idx] <= w_data;
        2'd1: wd[w_row][w_idx[$clog2(KS)-1:0]] <= w_data;
        default: w2[w_row][w_idx[$clog2(N_ROWS)-1:0]] <= w_data;
      endcase
    end
  end

  // stage state
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} st_t;
  st_t s1, s2, s3;
  logic [IW-1:0] n1, n3;
  logic [$clog2(KS)-1:0] n2;

  s_t [N_COLS-1:0][C_IN_MAX-1:0] in_buf;
  s_t [N_COLS-1:0][N_ROWS-1:0]   e_buf, e_in, d_buf, d_in;
  s_t [KS-2:0][N_ROWS-1:0]       hist;
  logic e_full, d_full;

  // matrices
  mat_t a1, wm1, y1, a2, wm2, y2, a3, wm3, y3;
  always_comb begin
    for (int r = 0; r < N_ROWS; r++)
      for (int c = 0; c < N_COLS; c++) begin
        a1[r][c]  = in_buf[c][n1];
        wm1[r][c] = w1[r][n1];
        // depthwise: pixel c-(KS-1)+n2, from the history when negative
        if (c + int'(n2) >= KS - 1) a2[r][c] = e_in[c + int'(n2) - (KS - 1)][r];
        else                        a2[r][c] = hist[c + int'(n2)][r];
        wm2[r][c] = wd[r][n2];
        a3[r][c]  = d_in[c][n3];
        wm3[r][c] = w2[r][n3];
      end
  end

  pu_matrix #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .DW(DW)) u_pw1 (
    .clk, .rst_n, .en(s1 == S_RUN), .clr(n1 == '0), .qf(qf[0]), .a(a1), .w(wm1), .y(y1));
  pu_matrix #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .DW(DW)) u_dw (
    .clk, .rst_n, .en(s2 == S_RUN), .clr(n2 == '0), .qf(qf[1]), .a(a2), .w(wm2), .y(y2));
  pu_matrix #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .DW(DW)) u_pw2 (
    .clk, .rst_n, .en(s3 == S_RUN), .clr(n3 == '0), .qf(qf[2]), .a(a3), .w(wm3), .y(y3));

  assign in_ready = (s1 == S_IDLE);

  wire s2_take = (s2 == S_IDLE) && e_full;
  wire s3_take = (s3 == S_IDLE) && d_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= S_IDLE; s2 <= S_IDLE; s3 <= S_IDLE;
      n1 <= '0; n2 <= '0; n3 <= '0;
      e_full <= 1'b0; d_full <= 1'b0; out_valid <= 1'b0;
      in_buf <= '0; e_buf <= '0; e_in <= '0; d_buf <= '0; d_in <= '0; hist <= '0;
      out_batch <= '0;
    end else begin
      if (hist_clr) hist <= '0;
      // ---- PW1 ----
      unique case (s1)
        S_IDLE: if (in_valid) begin in_buf <= in_batch; n1 <= '0; s1 <= S_RUN; end
        S_RUN:  if (n1 == IW'(c_in - 1'b1)) s1 <= S_FIN; else n1 <= n1 + 1'b1;
        S_FIN:  if (!e_full || s2_take) begin
                  for (int c = 0; c < N_COLS; c++)
                    for (int r = 0; r < N_ROWS; r++) e_buf[c][r] <= y1[r][c];
                  s1 <= S_IDLE; n1 <= '0;
                end
        default: s1 <= S_IDLE;
      endcase
      // ---- DW ----
      unique case (s2)
        S_IDLE: if (e_full) begin e_in <= e_buf; n2 <= '0; s2 <= S_RUN; end
        S_RUN:  if (n2 == ($clog2(KS))'(KS - 1)) s2 <= S_FIN; else n2 <= n2 + 1'b1;
        S_FIN:  if (!d_full || s3_take) begin
                  for (int c = 0; c < N_COLS; c++)
                    for (int r = 0; r < N_ROWS; r++) d_buf[c][r] <= y2[r][c];
                  for (int j = 0; j < KS - 1; j++) hist[j] <= e_in[N_COLS - (KS - 1) + j];
                  s2 <= S_IDLE; n2 <= '0;
                end
        default: s2 <= S_IDLE;
      endcase
      // ---- PW2 ----
      unique case (s3)
        S_IDLE: if (d_full) begin d_in <= d_buf; n3 <= '0; s3 <= S_RUN; end
        S_RUN:  if (n3 == IW'(N_ROWS - 1)) s3 <= S_FIN; else n3 <= n3 + 1'b1;
        S_FIN:  if (!out_valid || out_ready) begin
                  for (int c = 0; c < N_COLS; c++)
                    for (int r = 0; r < N_ROWS; r++) out_batch[c][r] <= y3[r][c];
                  s3 <= S_IDLE; n3 <= '0;
                end
        default: s3 <= S_IDLE;
      endcase
      // ---- buffer flags ----
      if (s1 == S_FIN && (!e_full || s2_take)) e_full <= 1'b1;
      else if (s2_take)                        e_full <= 1'b0;
      if (s2 == S_FIN && (!d_full || s3_take)) d_full <= 1'b1;
      else if (s3_take)                        d_full <= 1'b0;
      if (s3 == S_FIN && (!out_valid || out_ready)) out_valid <= 1'b1;
      else if (out_ready)                           out_valid <= 1'b0;
    end
  end

  a_cin_range : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready |-> c_in != 0 && 32'(c_in) <= C_IN_MAX)
    else $error("mbconv_engine: c_in out of range");
endmodule
