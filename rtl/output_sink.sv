// output_sink: output sink of the Convolution Engine.
//
// Writes the four saturated results of each output group of every row into
// that row's output memory at out_base + 4*k, k counting output groups
// from 0 after 'start', and counts the groups written so the engine knows
// when a run is complete. The document names the block and its port width;
// the sequential addressing is this design's.
// Timing: combinational write request on in_valid; 'count' is registered.
module output_sink
  import neuraghe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SADDR_W-1:0] base,
  input  logic               in_valid,
  output logic               wr_en,
  output logic [SADDR_W-1:0] wr_addr,
  output logic [11:0]        count
);
  logic [SADDR_W-1:0] ptr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; count <= '0;
    end else if (start) begin
      ptr <= base; count <= '0;
    end else if (in_valid) begin
      ptr <= ptr + SADDR_W'(LANES); count <= count + 12'd1;
    end
  end
  assign wr_en   = in_valid;
  assign wr_addr = ptr;
endmodule
