// data_storage: keeps the results of a digital unit cell for later retrieval.
//
// N_MEM independent memories of DEPTH 32-bit words. Each has a data control
// that appends the words of one selected source at consecutive addresses,
// either stopping when full (and raising overflow on a further append) or
// wrapping around as a circular buffer. Sources (per-memory select):
//   0 none, 1 result I, 2 result Q, 3 single qubit state,
//   4 packed states, 32 one-bit states per word,
//   5 packed states, 10 three-bit states per word,
//   6 words written to the append register by the sequencer or host.
// The state collection packs states LSB first and emits a word when it is
// complete. The second port of every memory is in the register space for
// direct reads and writes.
// Registers: 4 append register (write), 8+m config of memory m
// {circular[3], source[2:0]}, 12+m status {overflow[31], full[30], empty[29],
// size[15:0]}; 0x1000 + m*DEPTH + n: word n of memory m.
// A reset trigger (trigger-word bit 0) or control bit 0 empties all memories
// and clears the state collection.
// Timing: a source word is written one cycle after it arrives.
// Four memories, the source list, append/circular logic and the status flags
// follow the document; codes, register map and memory depth are this
// design's choice.
module data_storage
  import qi_pkg::*;
#(
  parameter int unsigned N_MEM    = 4,
  parameter int unsigned DEPTH    = 1024,
  parameter logic [15:0] SLAVE_ID = 16'h4453
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  input  logic        result_valid,
  input  logic [31:0] result_i,
  input  logic [31:0] result_q,
  input  logic        state_valid,
  input  logic [2:0]  state
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned MW = $clog2(N_MEM) > 0 ? $clog2(N_MEM) : 1;

  typedef enum logic [2:0] {
    SRC_NONE = 3'd0, SRC_RES_I = 3'd1, SRC_RES_Q = 3'd2, SRC_STATE = 3'd3,
    SRC_PACK1 = 3'd4, SRC_PACK3 = 3'd5, SRC_WB = 3'd6
  } src_e;

  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  logic clear;
  assign clear = (trig_v && trig.reset) || (reg_wr && reg_addr == REG_CONTROL && reg_wdata[0]);

  // ------------------------------------------------------------ state collection
  logic [31:0] pack1, pack3;
  logic [5:0]  n1;
  logic [3:0]  n3;
  logic        pack1_v, pack3_v;
  logic [31:0] pack1_w, pack3_w;
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      pack1 <= '0; pack3 <= '0; n1 <= '0; n3 <= '0;
      pack1_v <= 1'b0; pack3_v <= 1'b0; pack1_w <= '0; pack3_w <= '0;
    end else begin
      pack1_v <= 1'b0;
      pack3_v <= 1'b0;
      if (state_valid) begin
        if (n1 == 31) begin
          pack1_v <= 1'b1;
          pack1_w <= {state[0], pack1[30:0]};
          pack1   <= '0;
          n1      <= '0;
        end else begin
          pack1[n1[4:0]] <= state[0];
          n1 <= n1 + 1;
        end
        if (n3 == 9) begin
          pack3_v <= 1'b1;
          pack3_w <= {2'b00, state, pack3[26:0]};
          pack3   <= '0;
          n3      <= '0;
        end else begin
          pack3[3*n3 +: 3] <= state;
          n3 <= n3 + 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ data controls + memories
  src_e        src  [N_MEM];
  logic        circ [N_MEM];
  logic [AW:0] size [N_MEM];
  logic [AW-1:0] wptr [N_MEM];
  logic        ovf  [N_MEM];
  logic [31:0] mrd  [N_MEM];          // registered host-port read of each memory

  logic        wb_app;
  assign wb_app = reg_wr && reg_addr == 4;

  // host port decode
  logic            h_mem;
  logic [MW-1:0]   h_sel;
  logic [AW-1:0]   h_adr;
  assign h_mem = 32'(reg_addr) >= 32'h1000 && 32'(reg_addr) < 32'h1000 + N_MEM * DEPTH;
  assign h_sel = MW'((32'(reg_addr) - 32'h1000) / DEPTH);
  assign h_adr = AW'((32'(reg_addr) - 32'h1000) % DEPTH);

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    logic        app_v;
    logic [31:0] app_d;
    always_comb begin
      app_v = 1'b0;
      app_d = '0;
      case (src[m])
        SRC_RES_I: begin app_v = result_valid; app_d = result_i; end
        SRC_RES_Q: begin app_v = result_valid; app_d = result_q; end
        SRC_STATE: begin app_v = state_valid;  app_d = {29'b0, state}; end
        SRC_PACK1: begin app_v = pack1_v;      app_d = pack1_w; end
        SRC_PACK3: begin app_v = pack3_v;      app_d = pack3_w; end
        SRC_WB:    begin app_v = wb_app;       app_d = reg_wdata; end
        default: ;
      endcase
    end

    logic full;
    assign full = 32'(size[m]) == DEPTH;

    always_ff @(posedge clk) begin
      if (rst) begin
        src[m]  <= SRC_NONE;
        circ[m] <= 1'b0;
      end else if (reg_wr && reg_addr == REG_ADDR_W'(8 + m)) begin
        src[m]  <= src_e'(reg_wdata[2:0]);
        circ[m] <= reg_wdata[3];
      end
    end

    always_ff @(posedge clk) begin
      if (rst || clear) begin
        size[m] <= '0;
        wptr[m] <= '0;
        ovf[m]  <= 1'b0;
      end else if (app_v) begin
        if (!full || circ[m]) begin
          wptr[m] <= wptr[m] + 1'b1;           // wraps at DEPTH (power of two)
          if (!full) size[m] <= size[m] + 1'b1;
        end else begin
          ovf[m] <= 1'b1;
        end
      end
    end

    // port A: append; port B: register space
    logic [31:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (app_v && (!full || circ[m]) && !rst && !clear) mem[wptr[m]] <= app_d;
      else if (reg_wr && h_mem && h_sel == MW'(m))       mem[h_adr]   <= reg_wdata;
    end
    always_ff @(posedge clk) mrd[m] <= mem[h_adr];
  end

  // ------------------------------------------------------------ register read
  logic [31:0]   rdata_r;
  logic          rd_mem;
  logic [MW-1:0] rd_sel;
  always_ff @(posedge clk) begin
    rdata_r <= '0;
    rd_mem  <= reg_rd && h_mem;
    rd_sel  <= h_sel;
    if (reg_rd)
      for (int m = 0; m < N_MEM; m++) begin
        if (reg_addr == REG_ADDR_W'(8 + m))  rdata_r <= {28'b0, circ[m], src[m]};
        if (reg_addr == REG_ADDR_W'(12 + m)) rdata_r <= {ovf[m], 32'(size[m]) == DEPTH, size[m] == 0, 13'b0, 16'(size[m])};
      end
  end
  assign rdata = rd_mem ? mrd[rd_sel] : rdata_r;

endmodule
