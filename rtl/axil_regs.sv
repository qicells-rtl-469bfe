// axil_regs: a small AXI4-Lite slave that turns accesses into register
// strobes for modules outside the digital unit cells (cell coordinator, cell
// signal router).
//
// A write (address and data together) gives a one-cycle wr pulse with the
// register index (byte address / 4) and data; a read gives a one-cycle rd
// pulse, and the module must present the register value on rdata in the
// following cycle, where it is captured for the R channel. One access at a
// time, writes before reads, responses always OKAY.
// Timing: handshake in cycle t -> wr/rd in cycle t+1 -> B/R valid from t+3.
module axil_regs
  import qi_pkg::*;
#(
  parameter int unsigned AW = 8   // register index width
) (
  input  logic          clk,
  input  logic          rst,
  input  axil_req_t     axi_req,
  output axil_rsp_t     axi_rsp,
  output logic          wr,
  output logic          rd,
  output logic [AW-1:0] addr,
  output logic [31:0]   wdata,
  input  logic [31:0]   rdata
);

  typedef enum logic [1:0] {A_IDLE, A_ACC, A_CAP, A_RESP} ar_state_e;

  ar_state_e   st;
  logic        is_wr;
  logic [31:0] rq;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= A_IDLE; is_wr <= 1'b0; addr <= '0; wdata <= '0; rq <= '0;
    end else begin
      case (st)
        A_IDLE:
          if (axi_req.awvalid && axi_req.wvalid) begin
            is_wr <= 1'b1; addr <= axi_req.awaddr[AW+1:2]; wdata <= axi_req.wdata; st <= A_ACC;
          end else if (axi_req.arvalid) begin
            is_wr <= 1'b0; addr <= axi_req.araddr[AW+1:2]; st <= A_ACC;
          end
        A_ACC:  st <= A_CAP;
        A_CAP:  begin rq <= rdata; st <= A_RESP; end
        A_RESP: if (is_wr ? axi_req.bready : axi_req.rready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

  assign wr = st == A_ACC && is_wr;
  assign rd = st == A_ACC && !is_wr;

  always_comb begin
    axi_rsp         = '0;
    axi_rsp.awready = st == A_IDLE && axi_req.awvalid && axi_req.wvalid;
    axi_rsp.wready  = axi_rsp.awready;
    axi_rsp.arready = st == A_IDLE && !(axi_req.awvalid && axi_req.wvalid) && axi_req.arvalid;
    axi_rsp.bvalid  = st == A_RESP && is_wr;
    axi_rsp.rvalid  = st == A_RESP && !is_wr;
    axi_rsp.rdata   = rq;
  end

endmodule
