// sop_unit: Sum-of-Products unit of the MAC matrix.
//
// Four multiply-accumulate lanes (one DSP48 each) apply the same kernel
// element, one per cycle, to four neighbouring convolution windows of one
// input feature. A whole kernel is computed by one lane over kernel_size
// cycles, so any kernel size, stride or dilation costs no extra cycles: the
// sources simply deliver the right samples. This organisation is the
// document's.
//
// Timing: inputs (act, weight, first, last) are taken with in_valid.
// Stage 1 registers the four products (DSP M register); stage 2
// accumulates into the P register, restarting on 'first'. When the input
// marked 'last' has been accumulated, out_valid is high for one cycle with
// the four finished sums on out_acc, two cycles after that input.
module sop_unit
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_LANES = LANES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,
  input  logic                      in_last,
  input  sample_t [N_LANES-1:0]     act,
  input  sample_t                   weight,
  output logic                      out_valid,
  output acc_t    [N_LANES-1:0]     out_acc
);
  acc_t [N_LANES-1:0] prod_q;
  logic               v1, f1, l1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; f1 <= in_first; l1 <= in_last;
      out_valid <= v1 && l1;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < N_LANES; l++) begin
      if (in_valid) prod_q[l] <= acc_t'(act[l]) * acc_t'(weight);
      if (v1) out_acc[l] <= f1 ? prod_q[l] : out_acc[l] + prod_q[l];
    end
  end
endmodule
