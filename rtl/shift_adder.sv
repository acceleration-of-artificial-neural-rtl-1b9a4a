// shift_adder: output stage of one MAC matrix row.
//
// Adds, lane by lane, the accumulators of the N_COLS SoP units of the row,
// scales the sum down by qf fractional bits (arithmetic shift, truncating),
// optionally adds the partial result of a previous engine run read from the
// output memory (acc_en), and saturates to 16 bits. The sum of the column
// contributions and the partial-result accumulation are the document's; the
// place of the shift (before adding the 16-bit partial result), truncation
// and saturation are this design's choices.
// Timing: in_valid/acc/partial in one cycle, out_valid/out one cycle later.
module shift_adder
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_COLS = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  acc_quad_t [N_COLS-1:0]    acc,
  input  quad_t                     partial,
  input  logic                      acc_en,
  input  logic [5:0]                qf,
  output logic                      out_valid,
  output quad_t                     out
);
  localparam acc_t SMAX = acc_t'(2 ** (DATA_W - 1) - 1);
  localparam acc_t SMIN = -acc_t'(2 ** (DATA_W - 1));

  quad_t res;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      acc_t s;
      s = '0;
      for (int c = 0; c < N_COLS; c++) s = s + acc[c][l];
      s = s >>> qf;
      if (acc_en) s = s + acc_t'(partial[l]);
      if (s > SMAX)      res[l] = sample_t'(SMAX);
      else if (s < SMIN) res[l] = sample_t'(SMIN);
      else               res[l] = sample_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) if (in_valid) out <= res;
endmodule
