// qicell: the digital unit cell, everything needed to control and read out
// one qubit.
//
// The sequencer runs the experiment program and, as bus master with priority,
// configures and triggers the other modules over the Wishbone interconnect;
// the AXI4Lite bridge is the second master, for the processing system. The
// slaves are: 0 sequencer, 1 readout signal generator, 2 control signal
// generator, 3 signal recorder, 4 data storage, 5 pulse player, 6 digital
// trigger (register address = slave << 13 | register index; byte address on
// AXI = 4 * register address). A TRIG instruction writes one 20-bit trigger
// word to all of them in the same cycle. The signal recorder sends its
// results and states to the data storage directly, and its states to the
// cell coordinator, which hands them back to the sequencers of all cells.
// Streams: adc in, readout and control pulses out (SPC complex samples per
// clock), two pulse-player channels out (real), N_DIG digital outputs.
// busy is high while the sequencer or any pulse/recording is active.
// The module set and its connections follow the document; the slave numbering
// is this design's choice.
module qicell
  import qi_pkg::*;
#(
  parameter int unsigned MAX_CELLS  = 16,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned ENV_DEPTH  = 4096,
  parameter int unsigned TRACE_DEPTH = 4096,
  parameter int unsigned STORE_DEPTH = 1024,
  parameter int unsigned PP_DEPTH   = 2048,
  parameter int unsigned N_DIG      = 8,
  localparam int unsigned CW = $clog2(MAX_CELLS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  axil_req_t            axi_req,
  output axil_rsp_t            axi_rsp,
  // converters (through the cell signal router)
  input  iq_beat_t             adc,
  output iq_beat_t             ro_out,
  output iq_beat_t             ctrl_out,
  output real_beat_t           pp_out [2],
  output logic [N_DIG-1:0]     dig_out,
  // cell coordinator
  input  logic                 start,
  output logic                 busy,
  output logic                 sync,
  input  logic [MAX_CELLS-1:0] sync_req,
  output logic                 state_valid,
  output logic                 state,
  input  logic [MAX_CELLS-1:0] states,
  input  logic [MAX_CELLS-1:0] state_new,
  output logic                 data_sync,
  input  logic [MAX_CELLS-1:0] data_sync_req,
  output logic [31:0]          data_out,
  output logic [CW-1:0]        data_addr,
  input  logic [31:0]          data_in
);

  wb_req_t m_req [2];
  wb_rsp_t m_rsp [2];
  wb_req_t s_req [N_SLAVES];
  wb_rsp_t s_rsp [N_SLAVES];

  axil_wb_bridge u_bridge (
    .clk, .rst, .axi_req, .axi_rsp, .m_req(m_req[1]), .m_rsp(m_rsp[1])
  );

  wb_interconnect #(.N_SLV(N_SLAVES)) u_ic (
    .clk, .rst, .m_req, .m_rsp, .s_req, .s_rsp
  );

  logic seq_busy, ro_busy, ct_busy, rec_busy, pp_busy;

  sequencer #(.IMEM_DEPTH(IMEM_DEPTH), .MAX_CELLS(MAX_CELLS)) u_seq (
    .clk, .rst,
    .wb_req(s_req[SLV_SEQUENCER]), .wb_rsp(s_rsp[SLV_SEQUENCER]),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .start, .busy(seq_busy), .sync_o(sync), .sync_req, .states, .state_new,
    .data_sync_o(data_sync), .data_sync_req, .data_o(data_out),
    .data_addr_o(data_addr), .data_in
  );

  signal_generator #(.DEPTH(ENV_DEPTH), .READOUT(1'b1), .SLAVE_ID(16'h5352)) u_gen_ro (
    .clk, .rst, .wb_req(s_req[SLV_SIGGEN_RO]), .wb_rsp(s_rsp[SLV_SIGGEN_RO]),
    .busy(ro_busy), .out(ro_out)
  );

  signal_generator #(.DEPTH(ENV_DEPTH), .READOUT(1'b0), .SLAVE_ID(16'h5343)) u_gen_ct (
    .clk, .rst, .wb_req(s_req[SLV_SIGGEN_CT]), .wb_rsp(s_rsp[SLV_SIGGEN_CT]),
    .busy(ct_busy), .out(ctrl_out)
  );

  logic        res_v, st_store;
  logic [31:0] res_i, res_q;

  signal_recorder #(.TRACE_DEPTH(TRACE_DEPTH)) u_rec (
    .clk, .rst, .wb_req(s_req[SLV_RECORDER]), .wb_rsp(s_rsp[SLV_RECORDER]),
    .adc, .busy(rec_busy), .result_valid(res_v), .result_i(res_i), .result_q(res_q),
    .state_valid, .state, .state_store(st_store)
  );

  data_storage #(.DEPTH(STORE_DEPTH)) u_store (
    .clk, .rst, .wb_req(s_req[SLV_STORAGE]), .wb_rsp(s_rsp[SLV_STORAGE]),
    .result_valid(res_v), .result_i(res_i), .result_q(res_q),
    .state_valid(st_store), .state({2'b00, state})
  );

  pulse_player #(.DEPTH(PP_DEPTH)) u_pp (
    .clk, .rst, .wb_req(s_req[SLV_PULSE]), .wb_rsp(s_rsp[SLV_PULSE]),
    .busy(pp_busy), .out(pp_out)
  );

  digital_trigger #(.N_OUT(N_DIG)) u_dig (
    .clk, .rst, .wb_req(s_req[SLV_DIGTRIG]), .wb_rsp(s_rsp[SLV_DIGTRIG]),
    .dout(dig_out)
  );

  assign busy = seq_busy | ro_busy | ct_busy | rec_busy | pp_busy;

endmodule
