// mac_matrix: the Convolution Engine's N_ROWS x N_COLS array of SoP units.
//
// Column c receives the four samples of input feature c (one activation
// memory port per column); every SoP of that column sees the same samples
// and applies its own kernel (one weight bank per SoP), so row r computes
// the contribution of all N_COLS input features to output feature r.
// All SoPs advance in lock-step, so one valid/first/last set drives them
// all and the first SoP's out_valid stands for the whole array. The
// default 12 columns x 4 rows is the document's XC7Z020 configuration
// (192 DSP48: N_ROWS * N_COLS * 4, Eq. 3.3).
// Timing: as sop_unit, results two cycles after the 'last' input.
module mac_matrix
  import neuraghe_pkg::*;
#(
  parameter int unsigned N_ROWS = 4,
  parameter int unsigned N_COLS = 12
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic                                 in_first,
  input  logic                                 in_last,
  input  quad_t   [N_COLS-1:0]                 act,
  input  sample_t [N_ROWS-1:0][N_COLS-1:0]     weight,
  output logic                                 out_valid,
  output acc_quad_t [N_ROWS-1:0][N_COLS-1:0]   out_acc
);
  logic [N_ROWS-1:0][N_COLS-1:0] v;
  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      sop_unit u_sop (
        .clk, .rst_n, .in_valid, .in_first, .in_last,
        .act(act[c]), .weight(weight[r][c]),
        .out_valid(v[r][c]), .out_acc(out_acc[r][c])
      );
    end
  end
  assign out_valid = v[0][0];
endmodule
