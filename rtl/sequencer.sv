// sequencer: the RISC-V based controller of a digital unit cell. It runs the
// experiment program in 4 ns steps and drives every other module of the cell
// through the Wishbone bus.
//
// Instruction set: RV32I computational instructions, branches, JAL/JALR,
// LW/SW (word access to the cell's 16-bit register address space), MUL, and
// the sequencing set: TRIG, WAIT-IMM, WAIT-REG, WAIT-REG-TRIG, SYNC-STATE,
// SYNC-START (end of program), CELL-SYNC, CELL-DATA-SEND and CELL-DATA-RECV
// (encodings in qi_pkg). 32 registers, x0 reads as zero. The program memory
// (IMEM_DEPTH words) is a synchronous-read block RAM; the instruction at the
// next PC is fetched while the current one executes, so plain instructions
// take one clock.
// Cycle counts: ALU, LUI/AUIPC, untaken branch, TRIG, SYNC-START: 1;
// taken branch, JAL, JALR: 3; MUL: 6; LW/SW: 8 (4 of them the fixed bus
// latency); WAIT-IMM n / WAIT-REG: n (at least 1); WAIT-REG-TRIG: n-1;
// SYNC-STATE, CELL-SYNC and the data transfers wait for their partners.
// TRIG is a pipelined write of the trigger word to the broadcast address and
// does not wait for the bus; a following LW/SW first waits until every
// outstanding trigger write has been acknowledged.
// Barrier: CELL-SYNC raises sync_o and waits until every cell of its mask
// shows in sync_req (the coordinator's registered copy of all sync flags).
// Data transfer: the sender puts the register on data_o, the receiver puts the
// source cell on data_addr_o, both raise data_sync_o and wait for their mask
// in data_sync_req; the receiver then stores data_in.
// Slave registers: 1 status {pc[31:2]..., busy[0]} (bit 0 busy, [15:4] PC
// word index), 2 control (bit 0 start, bit 1 stop), 32+r register r (read),
// 0x1000+i program word i. start (from the cell coordinator) starts the
// program at address 0 when idle.
// The instruction set, the timings and the sync/transfer protocol follow the
// document; the instruction encodings and the register map are this design's.
module sequencer
  import qi_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned MAX_CELLS  = 16,
  parameter logic [15:0] SLAVE_ID   = 16'h5351
) (
  input  logic                 clk,
  input  logic                 rst,
  // configuration slave and bus master
  input  wb_req_t              wb_req,
  output wb_rsp_t              wb_rsp,
  output wb_req_t              m_req,
  input  wb_rsp_t              m_rsp,
  // cell coordinator
  input  logic                 start,
  output logic                 busy,
  output logic                 sync_o,
  input  logic [MAX_CELLS-1:0] sync_req,
  input  logic [MAX_CELLS-1:0] states,
  input  logic [MAX_CELLS-1:0] state_new,
  output logic                 data_sync_o,
  input  logic [MAX_CELLS-1:0] data_sync_req,
  output logic [31:0]          data_o,
  output logic [$clog2(MAX_CELLS)-1:0] data_addr_o,
  input  logic [31:0]          data_in
);

  localparam int unsigned IW = $clog2(IMEM_DEPTH);
  localparam int unsigned CW = $clog2(MAX_CELLS);

  typedef enum logic [3:0] {
    ST_IDLE, ST_EXEC, ST_STALL, ST_MUL, ST_BUSWAIT, ST_MEM,
    ST_STATE, ST_SYNC, ST_DSYNC
  } seq_state_e;

  // ------------------------------------------------------------ slave port
  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  logic imem_we, ctrl_start, ctrl_stop;
  assign imem_we    = reg_wr && 32'(reg_addr) >= 32'h1000 && 32'(reg_addr) < 32'h1000 + IMEM_DEPTH;
  assign ctrl_start = reg_wr && reg_addr == REG_CONTROL && reg_wdata[0];
  assign ctrl_stop  = (reg_wr && reg_addr == REG_CONTROL && reg_wdata[1]) || (trig_v && trig.reset && !busy);

  // ------------------------------------------------------------ state
  seq_state_e   st;
  logic [31:0]  pc;
  logic [31:0]  x [32];
  logic [31:0]  imem [IMEM_DEPTH];
  logic [31:0]  ir;
  logic [31:0]  cnt;
  logic [4:0]   rd_q;
  logic [31:0]  mul_a, mul_b;
  logic [CW-1:0] cell_q;
  logic [MAX_CELLS-1:0] mask_q;
  logic         is_load_q, recv_q;
  logic [7:0]   outstanding;

  // ------------------------------------------------------------ decode
  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [4:0]  rd, rs1, rs2;
  logic [31:0] a, b, imm_i, imm_s, imm_b, imm_u, imm_j;
  assign opc = ir[6:0];
  assign f3  = ir[14:12];
  assign f7  = ir[31:25];
  assign rd  = ir[11:7];
  assign rs1 = ir[19:15];
  assign rs2 = ir[24:20];
  assign a   = x[rs1];
  assign b   = x[rs2];
  assign imm_i = {{20{ir[31]}}, ir[31:20]};
  assign imm_s = {{20{ir[31]}}, ir[31:25], ir[11:7]};
  assign imm_b = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
  assign imm_u = {ir[31:12], 12'b0};
  assign imm_j = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};

  function automatic logic [31:0] alu(input logic [2:0] fn, input logic alt,
                                      input logic [31:0] p, input logic [31:0] q);
    case (fn)
      3'b000: return alt ? p - q : p + q;
      3'b001: return p << q[4:0];
      3'b010: return {31'b0, $signed(p) < $signed(q)};
      3'b011: return {31'b0, p < q};
      3'b100: return p ^ q;
      3'b101: return alt ? 32'($signed(p) >>> q[4:0]) : p >> q[4:0];
      3'b110: return p | q;
      default: return p & q;
    endcase
  endfunction

  logic take;
  always_comb begin
    case (f3)
      3'b000:  take = a == b;
      3'b001:  take = a != b;
      3'b100:  take = $signed(a) <  $signed(b);
      3'b101:  take = $signed(a) >= $signed(b);
      3'b110:  take = a <  b;
      3'b111:  take = a >= b;
      default: take = 1'b0;
    endcase
  end

  // ------------------------------------------------------------ execute
  seq_state_e  st_n;
  logic [31:0] pc_n, cnt_n;
  logic        wb_en;
  logic [4:0]  wb_rd;
  logic [31:0] wb_val;
  wb_req_t     mreq_n;
  logic        sync_n, dsync_n;
  logic [31:0] data_o_n;
  logic [CW-1:0] daddr_n;
  logic [31:0] wait_n;
  logic        is_mul;
  logic [31:0] ldst_addr;

  assign is_mul    = opc == OP_REG && f7 == 7'b0000001 && f3 == 3'b000;
  assign ldst_addr = a + (opc == OP_STORE ? imm_s : imm_i);

  always_comb begin
    st_n     = st;
    pc_n     = pc;
    cnt_n    = cnt;
    wb_en    = 1'b0;
    wb_rd    = rd;
    wb_val   = '0;
    mreq_n   = '0;
    sync_n   = sync_o;
    dsync_n  = data_sync_o;
    data_o_n = data_o;
    daddr_n  = data_addr_o;
    wait_n   = '0;

    case (st)
      ST_IDLE: begin
        pc_n = '0;
        if (start || ctrl_start) st_n = ST_EXEC;
      end

      ST_EXEC: begin
        pc_n = pc + 4;
        case (opc)
          OP_LUI:   begin wb_en = 1'b1; wb_val = imm_u; end
          OP_AUIPC: begin wb_en = 1'b1; wb_val = pc + imm_u; end
          OP_JAL: begin
            wb_en = 1'b1; wb_val = pc + 4; pc_n = pc + imm_j;
            st_n = ST_STALL; cnt_n = LAT_JUMP - 1;
          end
          OP_JALR: begin
            wb_en = 1'b1; wb_val = pc + 4; pc_n = (a + imm_i) & ~32'd1;
            st_n = ST_STALL; cnt_n = LAT_JUMP - 1;
          end
          OP_BRANCH: if (take) begin
            pc_n = pc + imm_b; st_n = ST_STALL; cnt_n = LAT_JUMP - 1;
          end
          OP_IMM: begin
            wb_en = 1'b1;
            wb_val = alu(f3, f3 == 3'b101 && ir[30], a, imm_i);
          end
          OP_REG: begin
            if (is_mul) begin
              st_n = ST_MUL; cnt_n = LAT_MUL - 1;
            end else begin
              wb_en = 1'b1; wb_val = alu(f3, ir[30], a, b);
            end
          end
          OP_LOAD, OP_STORE: begin
            if (outstanding != 0 || m_req.stb) begin
              pc_n = pc;                   // retry once the bus is idle
              st_n = ST_BUSWAIT;
            end else begin
              mreq_n.stb = 1'b1;
              mreq_n.we  = opc == OP_STORE;
              mreq_n.adr = ldst_addr[WB_ADDR_W-1:0];
              mreq_n.dat = b;
              st_n = ST_MEM; cnt_n = '0;
            end
          end
          OP_CUSTOM0: begin
            if (rd == 5'd0) begin         // TRIG
              mreq_n.stb = 1'b1;
              mreq_n.we  = 1'b1;
              mreq_n.adr = {WB_BROADCAST, REG_TRIGGER};
              mreq_n.dat = {ir[31:12], 12'b0};
            end else begin                // WAIT-IMM
              wait_n = {12'b0, ir[31:12]};
              if (wait_n > 1) begin st_n = ST_STALL; cnt_n = wait_n - 1; end
            end
          end
          OP_CUSTOM2: begin
            case (f3)
              3'd0, 3'd1: begin           // WAIT-REG, WAIT-REG-TRIG
                wait_n = (f3 == 3'd1 && a != 0) ? a - 1 : a;
                if (wait_n > 1) begin st_n = ST_STALL; cnt_n = wait_n - 1; end
              end
              3'd2: begin                 // SYNC-STATE
                if (state_new[ir[20 +: CW]]) begin
                  wb_en = 1'b1; wb_val = {31'b0, states[ir[20 +: CW]]};
                end else st_n = ST_STATE;
              end
              3'd3: begin                 // SYNC-START: end of program
                st_n = ST_IDLE; pc_n = '0;
              end
              default: ;
            endcase
          end
          OP_CUSTOM3: begin
            if (f3 == 3'd0) begin         // CELL-SYNC
              sync_n = 1'b1; st_n = ST_SYNC;
            end else if (f3 == 3'd1) begin // CELL-DATA-SEND
              dsync_n = 1'b1; data_o_n = x[ir[11:7]]; st_n = ST_DSYNC;
            end
          end
          OP_CUSTOM1: begin               // CELL-DATA-RECV
            dsync_n = 1'b1; daddr_n = ir[12 +: CW]; st_n = ST_DSYNC;
          end
          default: ;                      // anything else: no operation
        endcase
      end

      ST_STALL: begin
        if (cnt <= 1) st_n = ST_EXEC;
        cnt_n = cnt - 1;
      end

      ST_MUL: begin
        if (cnt <= 1) begin
          st_n = ST_EXEC; wb_en = 1'b1; wb_rd = rd_q; wb_val = mul_a * mul_b;
        end
        cnt_n = cnt - 1;
      end

      ST_BUSWAIT: if (outstanding == 0) st_n = ST_EXEC;

      ST_MEM: begin
        if (m_rsp.ack) begin
          if (is_load_q) begin wb_en = 1'b1; wb_rd = rd_q; wb_val = m_rsp.dat; end
          st_n = ST_STALL; cnt_n = LAT_LDST - 6;
        end
      end

      ST_STATE: if (state_new[cell_q]) begin
        wb_en = 1'b1; wb_rd = rd_q; wb_val = {31'b0, states[cell_q]}; st_n = ST_EXEC;
      end

      ST_SYNC: if ((sync_req & mask_q) == mask_q) begin
        sync_n = 1'b0; st_n = ST_EXEC;
      end

      ST_DSYNC: if ((data_sync_req & mask_q) == mask_q) begin
        dsync_n = 1'b0; data_o_n = '0; st_n = ST_EXEC;
        if (recv_q) begin wb_en = 1'b1; wb_rd = rd_q; wb_val = data_in; end
      end

      default: st_n = ST_IDLE;
    endcase

    if (ctrl_stop) begin
      st_n = ST_IDLE; pc_n = '0; sync_n = 1'b0; dsync_n = 1'b0; data_o_n = '0;
    end
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= ST_IDLE;
      pc          <= '0;
      cnt         <= '0;
      m_req       <= '0;
      sync_o      <= 1'b0;
      data_sync_o <= 1'b0;
      data_o      <= '0;
      data_addr_o <= '0;
      outstanding <= '0;
      rd_q <= '0; mul_a <= '0; mul_b <= '0; cell_q <= '0; mask_q <= '0;
      is_load_q <= 1'b0; recv_q <= 1'b0;
    end else begin
      st          <= st_n;
      pc          <= pc_n;
      cnt         <= cnt_n;
      m_req       <= mreq_n;
      sync_o      <= sync_n;
      data_sync_o <= dsync_n;
      data_o      <= data_o_n;
      data_addr_o <= daddr_n;
      outstanding <= outstanding + 8'(m_req.stb) - 8'(m_rsp.ack);
      if (st == ST_EXEC) begin
        rd_q      <= rd;
        mul_a     <= a;
        mul_b     <= b;
        cell_q    <= ir[20 +: CW];
        mask_q    <= ir[31:16];
        is_load_q <= opc == OP_LOAD;
        recv_q    <= opc == OP_CUSTOM1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < 32; r++) x[r] <= '0;
    end else if (wb_en && wb_rd != 0) begin
      x[wb_rd] <= wb_val;
    end
  end

  // program memory: host write port, fetch read port
  logic [IW-1:0] fetch_idx;
  assign fetch_idx = (st == ST_EXEC || st == ST_IDLE) ? pc_n[IW+1:2] : pc[IW+1:2];
  always_ff @(posedge clk) begin
    if (imem_we) imem[reg_addr[IW-1:0]] <= reg_wdata;
  end
  always_ff @(posedge clk) ir <= imem[fetch_idx];

  assign busy = st != ST_IDLE;

  // ------------------------------------------------------------ slave reads
  always_ff @(posedge clk) begin
    rdata <= '0;
    if (reg_rd) begin
      if (32'(reg_addr) >= 32'h1000 && 32'(reg_addr) < 32'h1000 + IMEM_DEPTH)
        rdata <= imem[reg_addr[IW-1:0]];
      else if (reg_addr >= 32 && reg_addr < 64)
        rdata <= x[reg_addr[4:0]];
      else if (reg_addr == REG_STATUS)
        rdata <= {16'b0, 12'(pc[31:2]), 3'b0, busy};
    end
  end

  // the bus never stalls the sequencer: it always has priority
  always_ff @(posedge clk)
    if (!rst && m_req.stb) assert (!m_rsp.stall) else $error("sequencer request stalled");

endmodule
