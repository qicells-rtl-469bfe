// tb_sequencer: loads a program through the sequencer's slave port, starts
// it and plays the rest of the cell around it: a bus model that acknowledges
// every request exactly four cycles after it is issued (as the interconnect
// does), and a cell-coordinator model with one partner cell (cell 1) that
// takes part in barriers and register transfers and reports a qubit state.
// The program brackets instructions with TRIG commands; the spacing of the
// trigger writes on the bus gives the cycle count of the instructions in
// between, which is checked against the documented counts: 1 per ALU
// instruction, 3 per taken jump/branch, 6 per MUL, 8 per LW/SW, n per WAIT,
// n-1 per WAIT-REG-TRIG, 3 cycles from the last arrival at a barrier or data
// transfer until the next instruction. It also checks that a load/store
// waits for a preceding trigger write, and the results in the registers.
module tb_sequencer;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  wb_req_t wb_req, m_req;
  wb_rsp_t wb_rsp, m_rsp;
  logic start = 0, busy, sync_o, data_sync_o;
  logic [15:0] sync_req, states, state_new, data_sync_req;
  logic [31:0] data_o, data_in;
  logic [3:0]  data_addr_o;

  sequencer #(.IMEM_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_common.svh"
  `include "seq_asm.svh"

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- bus model
  logic [3:0]  pv;
  logic [31:0] pd [4];
  logic [31:0] mem [logic [15:0]];
  int trig_cyc [int];
  int n_wait_ok = 0;
  always @(posedge clk) begin
    pv <= {pv[2:0], m_req.stb};
    for (int i = 3; i > 0; i--) pd[i] <= pd[i-1];
    pd[0] <= mem.exists(m_req.adr) ? mem[m_req.adr] : 32'h0;
    if (m_req.stb && m_req.we) mem[m_req.adr] = m_req.dat;
  end
  assign m_rsp = '{ack: pv[3], stall: 1'b0, dat: pv[3] ? pd[3] : 32'h0};
  always @(negedge clk) if (m_req.stb) begin
    if (m_req.adr == 16'hE003) trig_cyc[int'(m_req.dat[31:12])] = cyc;
    else begin
      check(pv == '0, "load/store waits until earlier bus accesses are answered");
      n_wait_ok++;
    end
  end

  // ---------------------------------------------------------------- coordinator model
  logic p_sync = 0, p_dsync = 0;
  logic [31:0] p_data = 0, p_recv;
  always @(posedge clk) begin
    sync_req      <= {14'b0, p_sync, sync_o};
    data_sync_req <= {14'b0, p_dsync, data_sync_o};
    data_in       <= data_addr_o == 4'd1 ? p_data : 32'h0;
    p_recv        <= data_o;               // the partner receives from cell 0
  end
  int p_sync_cyc, state_cyc;

  task automatic wait_trig(int t);
    while (!trig_cyc.exists(t)) @(negedge clk);
  endtask

  // partner cell 1
  initial begin
    states = '0; state_new = '0;
    wait_trig(10);
    repeat (20) @(negedge clk);
    states[3] = 1'b1; state_new[3] = 1'b1; state_cyc = cyc;
    @(negedge clk); state_new[3] = 1'b0;
    wait_trig(11);
    repeat (30) @(negedge clk);
    p_sync = 1; p_sync_cyc = cyc;                 // arrives last at the first barrier
    while (sync_req[1:0] != 2'b11) @(negedge clk);
    p_sync = 0;
    @(negedge clk); p_sync = 1;                   // arrives first at the second barrier
    while (sync_req[1:0] != 2'b11) @(negedge clk);
    p_sync = 0;
    @(negedge clk); p_dsync = 1;                  // receiver of cell 0's register
    while (data_sync_req[1:0] != 2'b11) @(negedge clk);
    check(p_recv == 35, $sformatf("partner received the sent register (%0d)", p_recv));
    p_dsync = 0;
    @(negedge clk); p_dsync = 1; p_data = 32'h00AB_CDEF;   // sender to cell 0
    while (data_sync_req[1:0] != 2'b11) @(negedge clk);
    p_dsync = 0; p_data = 0;
  end

  // ---------------------------------------------------------------- program
  logic [31:0] prog [$];
  initial begin
    prog = '{
      a_trig(1), a_addi(1, 0, 5), a_trig(2),                  // 0..2
      a_addi(2, 0, 7), a_mul(3, 1, 2), a_trig(3),             // 3..5
      a_jal(0, 8), a_trig(20'hFFFFF), a_trig(4),              // 6..8
      a_beq(1, 2, 8), a_bne(1, 2, 8), a_trig(20'hFFFFF),      // 9..11
      a_trig(5), a_wait(10), a_sw(3, 0, 'h104),               // 12..14
      a_lw(4, 0, 'h104), a_trig(6), a_trig(7),                // 15..17
      a_sw(4, 0, 'h108), a_trig(8), a_waitr(1),               // 18..20
      a_trig(9), a_waitrt(1), a_trig(10),                     // 21..23
      a_syncstate(5, 3), a_trig(11), a_cellsync(3),           // 24..26
      a_trig(12), a_cellsync(3), a_trig(13),                  // 27..29
      a_send(3, 3), a_trig(14), a_recv(6, 1, 3),              // 30..32
      a_trig(15), a_jal(7, 8), a_trig(20'hFFFFF),             // 33..35
      a_jalr(0, 7, 8), a_addi(8, 0, -3), a_sub(9, 1, 8),      // 36..38
      a_trig(16), a_end()                                     // 39..40
    };
  end

  logic [31:0] d;
  int d_sw;
  initial begin
    wb_req = '0; pv = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    foreach (prog[i]) wb_wr(16'(32'h1000 + i), prog[i]);
    wb_rd(16'h1000 + 16'd4, d); check(d == prog[4], "program memory read back");
    wb_rd(1, d); check(d[0] == 1'b0, "idle before start");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    #1 check(busy, "busy after start");
    while (busy) @(negedge clk);
    repeat (6) @(negedge clk);
    check(!trig_cyc.exists(20'hFFFFF), "skipped instructions not executed");
    for (int t = 1; t <= 16; t++) check(trig_cyc.exists(t), $sformatf("trigger %0d issued", t));
    check(trig_cyc[2] - trig_cyc[1] == 2, "ALU instruction takes 1 cycle");
    check(trig_cyc[3] - trig_cyc[2] == 8, "MUL takes 6 cycles");
    check(trig_cyc[4] - trig_cyc[3] == 4, "JAL takes 3 cycles");
    check(trig_cyc[5] - trig_cyc[4] == 5, "untaken branch 1 cycle, taken branch 3 cycles");
    check(trig_cyc[6] - trig_cyc[5] == 27, "WAIT 10 then SW and LW take 8 cycles each");
    check(trig_cyc[7] - trig_cyc[6] == 1, "TRIG commands issue back to back");
    // TRIG 7 is answered 4 cycles after it is on the bus; the SW waits for
    // the answer (6 cycles) and then takes its 8 cycles
    d_sw = trig_cyc[8] - trig_cyc[7];
    check(d_sw == 1 + 6 + 8, $sformatf("SW after TRIG waits for the bus (%0d cycles)", d_sw));
    check(trig_cyc[9] - trig_cyc[8] == 6, "WAIT-REG of 5 takes 5 cycles");
    check(trig_cyc[10] - trig_cyc[9] == 5, "WAIT-REG-TRIG of 5 plus TRIG takes 5 cycles");
    check(trig_cyc[11] - state_cyc == 2, "SYNC-STATE continues in the cycle after the new state");
    check(trig_cyc[12] - p_sync_cyc == 3, "barrier released 3 cycles after the partner's flag");
    check(trig_cyc[13] - trig_cyc[12] == 4, "last arrival at a barrier: next instruction 3 cycles later");
    check(trig_cyc[14] - trig_cyc[13] == 4, "send completes 3 cycles after the last arrival");
    check(trig_cyc[15] - trig_cyc[14] == 4, "receive completes 3 cycles after the last arrival");
    check(n_wait_ok == 3, "three load/store accesses");
    check(mem[16'h108] == 35, "SW stored the loaded value");
    wb_rd(16'd32 + 3, d); check(d == 35, "MUL result");
    wb_rd(16'd32 + 4, d); check(d == 35, "LW result");
    wb_rd(16'd32 + 5, d); check(d == 1, "SYNC-STATE result");
    wb_rd(16'd32 + 6, d); check(d == 32'h00AB_CDEF, "CELL-DATA-RECV result");
    wb_rd(16'd32 + 7, d); check(d == 140, "JAL link register");
    wb_rd(16'd32 + 8, d); check(d == 32'hFFFF_FFFD, "negative immediate");
    wb_rd(16'd32 + 9, d); check(d == 8, "SUB result");
    wb_rd(16'd32 + 0, d); check(d == 0, "x0 stays zero");
    wb_rd(1, d); check(d[0] == 1'b0, "idle after SYNC-START");
    // restart by the control register, stop by the control register
    wb_wr(2, 1);
    #1 check(busy, "started by the control register");
    wb_wr(2, 2);
    #1 check(!busy, "stopped by the control register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
