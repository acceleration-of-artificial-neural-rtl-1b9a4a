// mbconv_pu: Processing Unit of the MBConv engine: one DSP-style
// multiply-accumulate with saturation of the running sum.
//
// With en high, acc <= sat(acc_or_0 + a*w), where the previous sum is
// ignored when clr is high (start of a new dot product). The running sum
// saturates at ACC_W bits instead of wrapping, and the result 'y' is the
// sum shifted right by qf fraction bits and saturated to 16 bits. The
// document gives the DSP wrapper with saturation on successive
// accumulations; the widths and the output scaling are this design's.
// Timing: one MAC per cycle, sum updated at the clock edge, y combinational
// from the sum register.
module mbconv_pu #(
  parameter int unsigned DW    = 16,
  parameter int unsigned ACC_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] w,
  input  logic [4:0]           qf,
  output logic signed [DW-1:0] y
);
  localparam logic signed [ACC_W:0] AMAX = (ACC_W+1)'((64'(1) << (ACC_W - 1)) - 1);
  localparam logic signed [ACC_W:0] AMIN = -(ACC_W+1)'(64'(1) << (ACC_W - 1));
  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (DW - 1)) - 1);
  localparam logic signed [ACC_W-1:0] YMIN = -ACC_W'(1 << (DW - 1));

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   nxt;
  logic signed [ACC_W-1:0] sh;

  always_comb begin
    nxt = (clr ? (ACC_W+1)'(0) : (ACC_W+1)'(acc)) + (ACC_W+1)'(a) * (ACC_W+1)'(w);
    if (nxt > AMAX) nxt = AMAX;
    if (nxt < AMIN) nxt = AMIN;
    sh = acc >>> qf;
    if (sh > YMAX)      y = DW'(YMAX);
    else if (sh < YMIN) y = DW'(YMIN);
    else                y = DW'(sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= nxt[ACC_W-1:0];
  end
endmodule
