// sne_pkg: event format and constants of the spiking neural engine (SNE).
//
// An event is a 32-bit word: x position and y position (one byte each), a
// time reference (one byte), a 4-bit operation code and a 4-bit channel.
// The field widths are the document's; their order inside the word and
// the operation codes are this design's choices.
package sne_pkg;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_SPIKE = 4'd1,   // input spike at (x, y) on channel ch
    OP_TSTEP = 4'd2    // end of time step t: leak, fire and reset
  } sne_op_t;

  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic [7:0] t;
    sne_op_t    op;
    logic [3:0] ch;
  } sne_event_t;

  localparam int unsigned V_W = 8;   // membrane potential (neuron state) width
  localparam int unsigned W_W = 4;   // synaptic weight width

  // Cluster configuration (written through the slice's configuration port).
  typedef struct packed {
    logic [7:0]     tile_x;   // output position of neuron 0
    logic [7:0]     tile_y;
    logic [3:0]     out_ch;   // channel of the spikes this cluster emits
    logic [V_W-1:0] leak;     // L, subtracted at every time step (unsigned)
    logic [V_W-1:0] vth;      // firing threshold (signed)
  } sne_ccfg_t;

endpackage
