// pu_matrix: an N_ROWS x N_COLS matrix of MBConv Processing Units.
//
// Row r produces output feature r and column c works on pixel c of the
// current batch. Every unit has its own activation and weight input, so the
// same matrix serves the pointwise phases (activation broadcast along a
// column, weight along a row) and the depthwise phase (each unit sees its
// own channel and pixel). All units share en/clr/qf. The matrix shape
// "N_rows x N_cols Processing Units wrapping a DSP slice, N_cols input
// maps to N_rows output maps" is the document's.
// Timing: as mbconv_pu.
module pu_matrix #(
  parameter int unsigned N_ROWS = 12,
  parameter int unsigned N_COLS = 9,
  parameter int unsigned DW     = 16
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  en,
  input  logic                                  clr,
  input  logic [4:0]                            qf,
  input  logic signed [N_ROWS-1:0][N_COLS-1:0][DW-1:0] a,
  input  logic signed [N_ROWS-1:0][N_COLS-1:0][DW-1:0] w,
  output logic signed [N_ROWS-1:0][N_COLS-1:0][DW-1:0] y
);
  for (genvar r = 0; r < N_ROWS; r++) begin : g_r
    for (genvar c = 0; c < N_COLS; c++) begin : g_c
      mbconv_pu #(.DW(DW)) u_pu (
        .clk, .rst_n, .en, .clr, .a(a[r][c]), .w(w[r][c]), .qf, .y(y[r][c])
      );
    end
  end
endmodule
