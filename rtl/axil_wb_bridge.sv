// axil_wb_bridge: lets the processing system reach the registers of a
// digital unit cell. It takes AXI4-Lite accesses and issues them as Wishbone
// accesses on the cell's interconnect (as its second, lower-priority master).
//
// One access at a time; a write needs address and data together, and writes
// are taken before reads. The AXI byte address is turned into the cell's
// register address (byte address / 4). The Wishbone request is issued from a
// register, one cycle after the AXI handshake, and is held while the
// interconnect stalls it (the sequencer is using the bus). The answer is
// returned on B (OKAY) or R.
// Timing without stall: AXI handshake in cycle t, request on the bus at t+1,
// ack at t+5, B/R valid at t+6.
// Byte-to-register translation and the bridge's place follow the document;
// the handshake order is this design's choice.
module axil_wb_bridge
  import qi_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output wb_req_t   m_req,
  input  wb_rsp_t   m_rsp
);

  typedef enum logic [1:0] {B_IDLE, B_REQ, B_WAIT, B_RESP} br_state_e;

  br_state_e   st;
  logic        is_wr;
  logic [31:0] rdat;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= B_IDLE;
      m_req <= '0;
      is_wr <= 1'b0;
      rdat  <= '0;
    end else begin
      case (st)
        B_IDLE: begin
          if (axi_req.awvalid && axi_req.wvalid) begin
            m_req <= '{stb: 1'b1, we: 1'b1, adr: axi_req.awaddr[WB_ADDR_W+1:2], dat: axi_req.wdata};
            is_wr <= 1'b1;
            st    <= B_REQ;
          end else if (axi_req.arvalid) begin
            m_req <= '{stb: 1'b1, we: 1'b0, adr: axi_req.araddr[WB_ADDR_W+1:2], dat: '0};
            is_wr <= 1'b0;
            st    <= B_REQ;
          end
        end
        B_REQ: if (!m_rsp.stall) begin
          m_req.stb <= 1'b0;
          st        <= B_WAIT;
        end
        B_WAIT: if (m_rsp.ack) begin
          rdat <= m_rsp.dat;
          st   <= B_RESP;
        end
        B_RESP: if (is_wr ? axi_req.bready : axi_req.rready) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = st == B_IDLE && axi_req.awvalid && axi_req.wvalid;
    axi_rsp.wready  = axi_rsp.awready;
    axi_rsp.arready = st == B_IDLE && !(axi_req.awvalid && axi_req.wvalid) && axi_req.arvalid;
    axi_rsp.bvalid  = st == B_RESP && is_wr;
    axi_rsp.rvalid  = st == B_RESP && !is_wr;
    axi_rsp.rdata   = rdat;
  end

endmodule
