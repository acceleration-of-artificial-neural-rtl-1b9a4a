// dma_engine: one DMA unit of the CSP (the activation DMA or one of the two
// weight DMAs).
//
// Moves 'len' 64-bit words between off-chip memory (through a
// high-performance port) and the CSP's on-chip memories (through the local
// word port). dir = 0 loads (off-chip -> on-chip): read requests are issued
// back to back under valid/ready and every returned word is written locally
// as it arrives, so the transfer streams at one word per cycle when the
// port allows. dir = 1 stores (on-chip -> off-chip): each word is read
// locally (one cycle) and then sent as a write request. The document gives
// only the DMAs' roles and the 64-bit port width; the port protocol and
// the engine are this design's simplification of an AXI master.
// Timing: 'start' is taken when idle; 'done' pulses one cycle when the last
// word has been written at its destination (for stores: accepted by the port).
module dma_engine
  import neuraghe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              dir,
  input  logic [EXT_AW-1:0] ext_addr,
  input  logic [LOC_AW-1:0] loc_addr,
  input  logic [15:0]       len,
  output logic              busy,
  output logic              done,
  output ext_req_t          ext_req,
  input  ext_rsp_t          ext_rsp,
  output loc_req_t          loc_req,
  input  logic [EXT_DW-1:0] loc_rdata
);
  typedef enum logic [2:0] {IDLE, LOAD, ST_RD, ST_WAIT, ST_SEND} state_t;
  state_t            state;
  logic [EXT_AW-1:0] eaddr;
  logic [LOC_AW-1:0] laddr;
  logic [15:0]       n, issued, received;
  logic [EXT_DW-1:0] wbuf;

  assign busy = (state != IDLE);

  always_comb begin
    ext_req = '0;
    loc_req = '0;
    unique case (state)
      LOAD: begin
        ext_req.valid = (issued != n);
        ext_req.addr  = eaddr + EXT_AW'({issued, 3'b000});
        loc_req.en    = ext_rsp.rvalid;
        loc_req.we    = ext_rsp.rvalid;
        loc_req.addr  = laddr + LOC_AW'(received);
        loc_req.wdata = ext_rsp.rdata;
      end
      ST_RD: begin
        loc_req.en    = 1'b1;
        loc_req.addr  = laddr + LOC_AW'(issued);
      end
      ST_SEND: begin
        ext_req.valid = 1'b1;
        ext_req.we    = 1'b1;
        ext_req.addr  = eaddr + EXT_AW'({issued, 3'b000});
        ext_req.wdata = wbuf;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done <= 1'b0;
      eaddr <= '0; laddr <= '0; n <= '0; issued <= '0; received <= '0; wbuf <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          eaddr <= ext_addr; laddr <= loc_addr; n <= len;
          issued <= '0; received <= '0;
          if (len == 16'd0) done <= 1'b1;
          else state <= dir ? ST_RD : LOAD;
        end
        LOAD: begin
          if (ext_req.valid && ext_rsp.ready) issued <= issued + 16'd1;
          if (ext_rsp.rvalid) begin
            received <= received + 16'd1;
            if (received == n - 16'd1) begin
              state <= IDLE; done <= 1'b1;
            end
          end
        end
        ST_RD:   state <= ST_WAIT;
        ST_WAIT: begin
          wbuf  <= loc_rdata;
          state <= ST_SEND;
        end
        ST_SEND: if (ext_rsp.ready) begin
          issued <= issued + 16'd1;
          if (issued == n - 16'd1) begin
            state <= IDLE; done <= 1'b1;
          end else state <= ST_RD;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_spurious_rsp : assert property (@(posedge clk) disable iff (!rst_n)
    ext_rsp.rvalid |-> state == LOAD && received != issued)
    else $error("dma_engine: read data without an outstanding request");
  a_req_stable : assert property (@(posedge clk) disable iff (!rst_n)
    ext_req.valid && !ext_rsp.ready |=> ext_req.valid && $stable(ext_req.addr))
    else $error("dma_engine: request withdrawn before it was accepted");
endmodule
