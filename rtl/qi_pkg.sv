// qi_pkg: types and constants shared by the digital unit cell, the cell
// coordinator and the cell signal router.
//
// Sample streams carry SPC samples per 250 MHz clock (1 GS/s per channel),
// each a signed 16-bit I and Q value. The internal Wishbone bus has a 16-bit
// register address (upper 3 bits select the slave, 111 broadcasts) and 32-bit
// data. The layout of the 20-bit trigger word that the sequencer broadcasts to
// every slave follows the published register map; the custom sequencer opcodes
// defined at the end are this design's own encoding.
package qi_pkg;

  // ---------------------------------------------------------------- samples
  localparam int unsigned SPC      = 4;   // samples per clock (1 GS/s / 250 MHz)
  localparam int unsigned SAMPLE_W = 16;  // I/Q resolution of the converters

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // One clock's worth of complex base-band samples (AXI-stream without tready:
  // converters accept a beat every cycle).
  typedef struct packed {
    logic                  valid;
    sample_t [SPC-1:0]     i;
    sample_t [SPC-1:0]     q;
  } iq_beat_t;

  // One clock's worth of real samples (pulse player channels).
  typedef struct packed {
    logic                  valid;
    sample_t [SPC-1:0]     d;
  } real_beat_t;

  // ---------------------------------------------------------------- Wishbone
  localparam int unsigned WB_ADDR_W = 16;
  localparam int unsigned WB_DATA_W = 32;
  localparam int unsigned WB_SEL_W  = 3;                    // slave select bits
  localparam int unsigned REG_ADDR_W = WB_ADDR_W - WB_SEL_W; // address inside a slave
  localparam logic [WB_SEL_W-1:0] WB_BROADCAST = 3'b111;

  // Pipelined Wishbone request (master -> interconnect -> slave).
  typedef struct packed {
    logic                  stb;
    logic                  we;
    logic [WB_ADDR_W-1:0]  adr;
    logic [WB_DATA_W-1:0]  dat;
  } wb_req_t;

  // Wishbone response (slave -> interconnect -> master).
  typedef struct packed {
    logic                  ack;
    logic                  stall;
    logic [WB_DATA_W-1:0]  dat;
  } wb_rsp_t;

  // Common start of every slave's register map (register index = byte offset / 4).
  localparam logic [REG_ADDR_W-1:0] REG_INFO    = 'd0;
  localparam logic [REG_ADDR_W-1:0] REG_STATUS  = 'd1;
  localparam logic [REG_ADDR_W-1:0] REG_CONTROL = 'd2;
  localparam logic [REG_ADDR_W-1:0] REG_TRIGGER = 'd3;

  // Slave numbers on the cell's interconnect (this design's assignment).
  localparam int unsigned SLV_SEQUENCER = 0;
  localparam int unsigned SLV_SIGGEN_RO = 1;
  localparam int unsigned SLV_SIGGEN_CT = 2;
  localparam int unsigned SLV_RECORDER  = 3;
  localparam int unsigned SLV_STORAGE   = 4;
  localparam int unsigned SLV_PULSE     = 5;
  localparam int unsigned SLV_DIGTRIG   = 6;
  localparam int unsigned N_SLAVES      = 7;

  // ---------------------------------------------------------------- trigger word
  localparam int unsigned TRIG_W = 20;

  typedef struct packed {
    logic [1:0] dig_trig;     // 19:18
    logic [3:0] pulse_player; // 17:14 (two 2-bit channel fields)
    logic [3:0] ctrl_gen;     // 13:10
    logic [1:0] recorder;     // 9:8
    logic [3:0] readout_gen;  // 7:4
    logic       rsvd;         // 3
    logic       sync;         // 2  re-synchronise NCOs
    logic       start;        // 1  start of an execution
    logic       reset;        // 0  reset module state
  } trig_word_t;

  // Signal recorder modes (2-bit trigger value, 0 = no operation).
  typedef enum logic [1:0] {
    REC_NOP        = 2'd0,
    REC_SINGLE     = 2'd1,
    REC_ONESHOT    = 2'd2,
    REC_CONTINUOUS = 2'd3
  } rec_mode_e;

  // ---------------------------------------------------------------- AXI4-Lite
  localparam int unsigned AXIL_ADDR_W = 18;  // byte address = 4 * register address

  typedef struct packed {
    logic                    awvalid;
    logic [AXIL_ADDR_W-1:0]  awaddr;
    logic                    wvalid;
    logic [31:0]             wdata;
    logic                    bready;
    logic                    arvalid;
    logic [AXIL_ADDR_W-1:0]  araddr;
    logic                    rready;
  } axil_req_t;

  typedef struct packed {
    logic                    awready;
    logic                    wready;
    logic                    bvalid;
    logic [1:0]              bresp;
    logic                    arready;
    logic                    rvalid;
    logic [31:0]             rdata;
    logic [1:0]              rresp;
  } axil_rsp_t;

  // ---------------------------------------------------------------- sequencer
  // RISC-V base opcodes used.
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  // Custom opcodes of the sequencing set (this design's encoding):
  //  CUSTOM0 [31:12] imm20, [11:7] sub: 0 = TRIG (imm20 = trigger word),
  //                                     1 = WAIT-IMM (imm20 = cycles)
  //  CUSTOM1 [31:16] cell mask, [15:12] source cell, [11:7] rd: CELL-DATA-RECV
  //  CUSTOM2 I-type, funct3: 0 WAIT-REG rs1, 1 WAIT-REG-TRIG rs1,
  //                          2 SYNC-STATE rd, imm[3:0] = cell, 3 SYNC-START (end)
  //  CUSTOM3 [31:16] cell mask, [14:12] funct3: 0 CELL-SYNC,
  //                                     1 CELL-DATA-SEND rs = [11:7]
  localparam logic [6:0] OP_CUSTOM0 = 7'b0001011;
  localparam logic [6:0] OP_CUSTOM1 = 7'b0101011;
  localparam logic [6:0] OP_CUSTOM2 = 7'b1011011;
  localparam logic [6:0] OP_CUSTOM3 = 7'b1111011;

  // Instruction timing (cycles).
  localparam int unsigned LAT_JUMP  = 3;
  localparam int unsigned LAT_MUL   = 6;
  localparam int unsigned LAT_LDST  = 8;

  // ---------------------------------------------------------------- helpers
  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
