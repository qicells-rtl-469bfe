// wb_slave_if: the register interface every slave of the digital unit cell
// shares. It never stalls and answers every access exactly two cycles after
// the request, which keeps bus timing deterministic.
//
// Timing: a request on wb_req in cycle k is registered and presented to the
// owning module in cycle k+1 on reg_wr/reg_rd/reg_addr/reg_wdata. The module
// must register its read data at the end of k+1 (a register mux or a
// synchronous memory read) and hold it on rdata in cycle k+2, when ack is
// raised and rdata is passed to wb_rsp.dat. A write to the trigger register
// (index 3, normally a broadcast) also appears as a one-cycle pulse on
// trig_valid/trig in cycle k+1. Registers 0 (info) is answered here from the
// ID/VERSION parameters; all other reads come from the module.
// Fixed 2-cycle latency and the common register start follow the document;
// the exact handshake signals are this design's choice.
module wb_slave_if
  import qi_pkg::*;
#(
  parameter logic [15:0] SLAVE_ID      = 16'h0000,
  parameter logic [15:0] SLAVE_VERSION = 16'h0001
) (
  input  logic                  clk,
  input  logic                  rst,
  input  wb_req_t               wb_req,
  output wb_rsp_t               wb_rsp,
  output logic                  reg_wr,
  output logic                  reg_rd,
  output logic [REG_ADDR_W-1:0] reg_addr,
  output logic [31:0]           reg_wdata,
  input  logic [31:0]           rdata,
  output logic                  trig_valid,
  output trig_word_t            trig
);

  logic                  req_v, req_we;
  logic [REG_ADDR_W-1:0] req_a;
  logic [31:0]           req_d;
  logic                  ack_q, info_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_v  <= 1'b0;
      ack_q  <= 1'b0;
      info_q <= 1'b0;
    end else begin
      req_v  <= wb_req.stb;
      ack_q  <= req_v;
      info_q <= req_v && !req_we && req_a == REG_INFO;
    end
    req_we <= wb_req.we;
    req_a  <= wb_req.adr[REG_ADDR_W-1:0];
    req_d  <= wb_req.dat;
  end

  assign reg_wr    = req_v &&  req_we;
  assign reg_rd    = req_v && !req_we;
  assign reg_addr  = req_a;
  assign reg_wdata = req_d;

  assign trig_valid = reg_wr && req_a == REG_TRIGGER;
  assign trig       = trig_word_t'(req_d[31:32-TRIG_W]);

  assign wb_rsp.ack   = ack_q;
  assign wb_rsp.stall = 1'b0;
  assign wb_rsp.dat   = !ack_q ? 32'h0 : info_q ? {SLAVE_ID, SLAVE_VERSION} : rdata;

endmodule
