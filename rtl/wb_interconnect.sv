// wb_interconnect: the cell's Wishbone interconnect for two masters and up
// to seven slaves, with fixed latency.
//
// Master 0 (the sequencer) always wins; master 1 (the AXI4Lite bridge) is
// stalled in any cycle in which master 0 requests. The upper three address
// bits select the slave (000..110); 111 broadcasts the access to every slave
// at once, which is how one trigger word reaches all modules in the same
// cycle. Every cycle a new pipelined request can be accepted, even while
// earlier ones are in flight: requests are registered towards the slaves,
// every slave answers exactly two cycles later, and the answer is registered
// back to the master that issued it (a broadcast returns slave 0's answer).
// Timing: request accepted in cycle c -> ack and read data at the master in
// cycle c+4. Master 0 is never stalled.
// Priority, address decoding, broadcast and pipelining follow the document;
// the way it is pipelined is this design's choice.
module wb_interconnect
  import qi_pkg::*;
#(
  parameter int unsigned N_SLV = N_SLAVES
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t m_req [2],
  output wb_rsp_t m_rsp [2],
  output wb_req_t s_req [N_SLV],
  input  wb_rsp_t s_rsp [N_SLV]
);

  typedef struct packed {
    logic                v;
    logic                m;     // master that issued the request
    logic [WB_SEL_W-1:0] slv;
  } tag_t;

  // arbitration
  logic    gnt1;
  wb_req_t sel;
  assign gnt1 = !m_req[0].stb && m_req[1].stb;
  assign sel  = m_req[0].stb ? m_req[0] : m_req[1];

  tag_t tag1, tag2, tag3;
  wb_req_t req_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0; req_q <= '0;
    end else begin
      req_q <= sel;
      tag1  <= '{v: sel.stb, m: gnt1, slv: sel.adr[WB_ADDR_W-1 -: WB_SEL_W]};
      tag2  <= tag1;
      tag3  <= tag2;
    end
  end

  // fan-out to the slaves
  for (genvar s = 0; s < N_SLV; s++) begin : g_slv
    always_comb begin
      s_req[s]     = req_q;
      s_req[s].stb = tag1.v && (tag1.slv == WB_BROADCAST || 32'(tag1.slv) == s);
    end
  end

  // response path
  wb_rsp_t rsp_sel;
  always_comb begin
    rsp_sel = '0;
    for (int s = 0; s < N_SLV; s++)
      if (tag3.slv == WB_BROADCAST ? s == 0 : 32'(tag3.slv) == s) rsp_sel = s_rsp[s];
  end

  logic        ack_q [2];
  logic [31:0] dat_q [2];
  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q[0] <= 1'b0; ack_q[1] <= 1'b0;
      dat_q[0] <= '0;   dat_q[1] <= '0;
    end else begin
      for (int m = 0; m < 2; m++) begin
        ack_q[m] <= tag3.v && 32'(tag3.m) == m;
        dat_q[m] <= (tag3.v && 32'(tag3.m) == m) ? rsp_sel.dat : '0;
      end
    end
  end

  assign m_rsp[0] = '{ack: ack_q[0], stall: 1'b0,       dat: dat_q[0]};
  assign m_rsp[1] = '{ack: ack_q[1], stall: m_req[0].stb, dat: dat_q[1]};

  // every slave answers on time
  always_ff @(posedge clk)
    if (!rst && tag3.v) assert (rsp_sel.ack) else $error("slave did not answer within the fixed latency");

endmodule
