// qicontroller_top: the programmable-logic part of the qubit controller:
// N_CELLS digital unit cells, the cell coordinator that synchronizes them,
// and the cell signal router between the cells and the converters.
//
// All logic runs in one 250 MHz clock domain derived from the converter
// clock, so there is no clock-domain crossing and every latency is fixed.
// Each cell, the coordinator and the router has its own AXI4-Lite port; the
// processing system's AXI interconnect that would fan these out is outside
// this design. DAC and ADC channels are complex (I/Q pairs of converters) and
// carry SPC samples per clock. Digital trigger outputs of all cells are
// brought out.
// Cell count and structure follow the document; one AXI port per module
// instead of an interconnect is this design's choice.
module qicontroller_top
  import qi_pkg::*;
#(
  parameter int unsigned N_CELLS     = 10,
  parameter int unsigned N_DAC       = 4,
  parameter int unsigned N_ADC       = 4,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned ENV_DEPTH   = 4096,
  parameter int unsigned TRACE_DEPTH = 4096,
  parameter int unsigned STORE_DEPTH = 1024,
  parameter int unsigned PP_DEPTH    = 2048,
  parameter int unsigned N_DIG       = 8,
  localparam int unsigned MAX_CELLS  = 16,
  localparam int unsigned CW         = $clog2(MAX_CELLS)
) (
  input  logic             clk,
  input  logic             rst,
  input  axil_req_t        cell_axi_req [N_CELLS],
  output axil_rsp_t        cell_axi_rsp [N_CELLS],
  input  axil_req_t        coord_axi_req,
  output axil_rsp_t        coord_axi_rsp,
  input  axil_req_t        router_axi_req,
  output axil_rsp_t        router_axi_rsp,
  output logic             any_busy,
  output iq_beat_t         dac [N_DAC],
  input  iq_beat_t         adc [N_ADC],
  output logic [N_DIG-1:0] dig_out [N_CELLS]
);

  logic [N_CELLS-1:0]   busy, start, sync, state, state_valid, data_sync;
  logic [MAX_CELLS-1:0] sync_req, states, state_new, data_sync_req;
  logic [31:0]          data_out  [N_CELLS];
  logic [CW-1:0]        data_addr [N_CELLS];
  logic [31:0]          data_recv [N_CELLS];
  iq_beat_t             cell_ctrl [N_CELLS];
  iq_beat_t             cell_ro   [N_CELLS];
  real_beat_t           cell_pp   [N_CELLS][2];
  iq_beat_t             cell_adc  [N_CELLS];

  for (genvar c = 0; c < N_CELLS; c++) begin : g_cell
    qicell #(
      .MAX_CELLS(MAX_CELLS), .IMEM_DEPTH(IMEM_DEPTH), .ENV_DEPTH(ENV_DEPTH),
      .TRACE_DEPTH(TRACE_DEPTH), .STORE_DEPTH(STORE_DEPTH), .PP_DEPTH(PP_DEPTH),
      .N_DIG(N_DIG)
    ) u_cell (
      .clk, .rst,
      .axi_req(cell_axi_req[c]), .axi_rsp(cell_axi_rsp[c]),
      .adc(cell_adc[c]), .ro_out(cell_ro[c]), .ctrl_out(cell_ctrl[c]),
      .pp_out(cell_pp[c]), .dig_out(dig_out[c]),
      .start(start[c]), .busy(busy[c]), .sync(sync[c]), .sync_req,
      .state_valid(state_valid[c]), .state(state[c]), .states, .state_new,
      .data_sync(data_sync[c]), .data_sync_req, .data_out(data_out[c]),
      .data_addr(data_addr[c]), .data_in(data_recv[c])
    );
  end

  cell_coordinator #(.N_CELLS(N_CELLS), .MAX_CELLS(MAX_CELLS)) u_coord (
    .clk, .rst, .axi_req(coord_axi_req), .axi_rsp(coord_axi_rsp), .any_busy,
    .busy, .start, .sync, .sync_req, .state, .state_valid, .states, .state_new,
    .data_sync, .data_sync_req, .data_out, .data_addr, .data_recv
  );

  cell_signal_router #(.N_CELLS(N_CELLS), .N_DAC(N_DAC), .N_ADC(N_ADC)) u_router (
    .clk, .rst, .axi_req(router_axi_req), .axi_rsp(router_axi_rsp),
    .cell_ctrl, .cell_ro, .cell_pp, .dac, .adc, .cell_adc
  );

endmodule
