// neuraghe_pkg: types and constants shared by the Convolution Specific
// Processor (CSP) blocks.
//
// Data are 16-bit signed fixed point with a run-time selectable number of
// fractional bits. Each Sum-of-Products (SoP) unit works on LANES = 4
// neighbouring convolution windows at once, so every engine-side memory port
// moves 4 samples per cycle. Activation and output memories are built from
// 8 interleaved 1024 x 16 banks (RAMB18-sized), which keeps the 4 strided
// reads conflict-free for strides up to 3. These numbers follow the
// document; the 48-bit accumulator width is the DSP48 accumulator and is
// this design's choice, as are the register map and the local address map.
package neuraghe_pkg;

  localparam int unsigned DATA_W     = 16;   // sample and weight width
  localparam int unsigned ACC_W      = 48;   // DSP48 accumulator width
  localparam int unsigned LANES      = 4;    // windows per SoP (4 DSPs)
  localparam int unsigned NBANK      = 8;    // RAMB18 banks per memory port
  localparam int unsigned BANK_DEPTH = 1024; // 16-bit words per RAMB18
  localparam int unsigned SADDR_W    = $clog2(NBANK * BANK_DEPTH);  // 13: sample address
  localparam int unsigned WORD_AW    = SADDR_W - $clog2(LANES);     // 11: 64-bit word address
  localparam int unsigned WADDR_W    = $clog2(BANK_DEPTH);          // 10: weight address
  localparam int unsigned WWORD_AW   = WADDR_W - $clog2(LANES);     // 8: weight word address
  localparam int unsigned EXT_AW     = 32;   // off-chip (DDR) byte address
  localparam int unsigned EXT_DW     = 64;   // high-performance port width
  localparam int unsigned LOC_AW     = 20;   // DMA local word address

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef sample_t [LANES-1:0]      quad_t;   // 4 samples = one 64-bit word
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef acc_t [LANES-1:0]         acc_quad_t;

  // One convolution run of the Convolution Engine, as programmed by the
  // soft-core through the CSP registers.
  typedef struct packed {
    logic [9:0]         kw;        // kernel width (taps along a row), >= 1
    logic [5:0]         kh;        // kernel height (rows), >= 1; 1 for TCN
    logic [9:0]         dilation;  // distance between taps along a row
    logic [1:0]         stride;    // 1..3, distance between neighbour windows
    logic [SADDR_W-1:0] row_step;  // address distance between kernel rows
    logic [11:0]        n_og;      // number of 4-sample output groups
    logic [SADDR_W-1:0] act_base;  // first sample of the first window
    logic [WADDR_W-1:0] w_base;    // first kernel element in each weight bank
    logic [SADDR_W-1:0] out_base;  // first output / partial-result sample
    logic               acc_en;    // add partial results from the other section
    logic               out_sel;   // output section written (partials: the other)
    logic [5:0]         qf;        // right shift applied to the sum (fraction bits)
  } ce_cfg_t;

  // Simplified high-performance port towards off-chip memory: one request
  // per cycle under valid/ready, read data returned in order.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [EXT_AW-1:0] addr;
    logic [EXT_DW-1:0] wdata;
  } ext_req_t;

  typedef struct packed {
    logic              ready;
    logic              rvalid;
    logic [EXT_DW-1:0] rdata;
  } ext_rsp_t;

  // Local side of a DMA: one 64-bit word per cycle, read data one cycle later.
  typedef struct packed {
    logic              en;
    logic              we;
    logic [LOC_AW-1:0] addr;
    logic [EXT_DW-1:0] wdata;
  } loc_req_t;

  // Register bus from the soft-core (32-bit word registers).
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [7:0]  addr;
    logic [31:0] wdata;
  } reg_req_t;

  // Local address map of the DMAs: region in [19:16], port index in [15:11].
  localparam logic [3:0] REG_ACT  = 4'd0;  // activation memory of column idx
  localparam logic [3:0] REG_OUT0 = 4'd1;  // output memory section 0 of row idx
  localparam logic [3:0] REG_OUT1 = 4'd2;  // output memory section 1 of row idx
  localparam logic [3:0] REG_WGT  = 4'd3;  // weight bank: [15:8] SoP index, [7:0] word

  // Register map (word addresses)
  localparam logic [7:0] R_CE_CTRL  = 8'h00; // W: bit0 start; R: bit0 busy
  localparam logic [7:0] R_CE_KER   = 8'h01; // kw[9:0], kh[21:16]
  localparam logic [7:0] R_CE_DS    = 8'h02; // dilation[9:0], stride[17:16]
  localparam logic [7:0] R_CE_ROW   = 8'h03; // row_step
  localparam logic [7:0] R_CE_NOG   = 8'h04; // n_og
  localparam logic [7:0] R_CE_ABASE = 8'h05; // act_base
  localparam logic [7:0] R_CE_WBASE = 8'h06; // w_base
  localparam logic [7:0] R_CE_OBASE = 8'h07; // out_base
  localparam logic [7:0] R_CE_MODE  = 8'h08; // acc_en[0], out_sel[1], qf[13:8]
  localparam logic [7:0] R_STATUS   = 8'h09; // sticky done flags, write 1 to clear
  localparam logic [7:0] R_DMA0     = 8'h10; // DMA k at R_DMA0 + 4k: ctrl, ext, loc, len

endpackage
