// cell_coordinator: the star point between all digital unit cells. Every
// cell has its own connection to it, and everything it hands back is
// registered once and given to all cells in the same cycle, which keeps the
// cells synchronous.
//
// Functions:
//  - busy aggregation: the busy flags of all cells, and whether any is busy;
//  - start trigger: a write of a cell mask to the start register pulses the
//    start line of every cell in the mask in the same cycle;
//  - barrier synchronization: the sync flags of all cells are collected into
//    one vector (sync_req) given to every cell;
//  - qubit state distribution: the last state reported by every cell, and a
//    one-cycle "new" flag per cell, given to every cell;
//  - register data transfer: per cell a multiplexer picks the data output of
//    the cell named by that cell's data address; the data-sync flags are
//    collected like the barrier flags, with the same one-cycle delay, so
//    data and flags arrive together.
// Registers (AXI4-Lite, byte offset): 0x0 info, 0x4 busy vector,
// 0x8 {any busy}, 0xC start mask (write), 0x10 last qubit states.
// Timing: every output follows its inputs by one clock; start follows the
// register write by one clock.
// The five functions and the star structure follow the document; register
// map and the single-cycle registering are this design's choice.
module cell_coordinator
  import qi_pkg::*;
#(
  parameter int unsigned N_CELLS   = 10,
  parameter int unsigned MAX_CELLS = 16,
  localparam int unsigned CW = $clog2(MAX_CELLS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  axil_req_t            axi_req,
  output axil_rsp_t            axi_rsp,
  output logic                 any_busy,
  // per cell
  input  logic [N_CELLS-1:0]   busy,
  output logic [N_CELLS-1:0]   start,
  input  logic [N_CELLS-1:0]   sync,
  output logic [MAX_CELLS-1:0] sync_req,
  input  logic [N_CELLS-1:0]   state,
  input  logic [N_CELLS-1:0]   state_valid,
  output logic [MAX_CELLS-1:0] states,
  output logic [MAX_CELLS-1:0] state_new,
  input  logic [N_CELLS-1:0]   data_sync,
  output logic [MAX_CELLS-1:0] data_sync_req,
  input  logic [31:0]          data_out  [N_CELLS],
  input  logic [CW-1:0]        data_addr [N_CELLS],
  output logic [31:0]          data_recv [N_CELLS]
);

  logic        wr, rd;
  logic [5:0]  addr;
  logic [31:0] wdata, rdata;

  axil_regs #(.AW(6)) u_regs (
    .clk, .rst, .axi_req, .axi_rsp, .wr, .rd, .addr, .wdata, .rdata
  );

  always_ff @(posedge clk) begin
    rdata <= '0;
    if (rd)
      case (addr)
        6'd0: rdata <= 32'h43430001;
        6'd1: rdata <= 32'(busy);
        6'd2: rdata <= {31'b0, any_busy};
        6'd4: rdata <= 32'(states);
        default: rdata <= '0;
      endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      any_busy      <= 1'b0;
      start         <= '0;
      sync_req      <= '0;
      states        <= '0;
      state_new     <= '0;
      data_sync_req <= '0;
    end else begin
      any_busy      <= |busy;
      start         <= (wr && addr == 6'd3) ? wdata[N_CELLS-1:0] : '0;
      sync_req      <= MAX_CELLS'(sync);
      data_sync_req <= MAX_CELLS'(data_sync);
      state_new     <= MAX_CELLS'(state_valid);
      for (int c = 0; c < N_CELLS; c++)
        if (state_valid[c]) states[c] <= state[c];
    end
  end

  // register data transfer multiplexers
  for (genvar c = 0; c < N_CELLS; c++) begin : g_mux
    always_ff @(posedge clk) begin
      if (rst)                                 data_recv[c] <= '0;
      else if (32'(data_addr[c]) < N_CELLS)    data_recv[c] <= data_out[data_addr[c]];
      else                                     data_recv[c] <= '0;
    end
  end

endmodule
