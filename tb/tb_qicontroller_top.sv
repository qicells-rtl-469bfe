// tb_qicontroller_top: the full controller at its default size (10 cells,
// 4 DAC and 4 ADC channels, full memories). DAC channel 0 is looped back to
// ADC channel 0 through one register stage. The host configures the modules
// of cells 0..2 and the cell signal router, loads a program into every cell
// and starts all cells at once through the cell coordinator:
//   cell 0 plays a readout pulse and records it, waits for its own state via
//          the coordinator, joins a barrier, plays a control pulse and sends
//          its state register to cell 2;
//   cell 1 waits for cell 0's state and, if it is 1, plays a flux pulse on
//          its pulse player, then joins the barrier and plays a control pulse;
//   cell 2 waits long, joins the barrier last, plays a control pulse and
//          receives cell 0's register;
//   cells 3..9 wait for different times and end.
// The router sends the readout sum of cell 0 to DAC 0, the control sum of
// cells 0..2 to DAC 1 (frequency-multiplexed, different NCO frequencies) and
// the pulse player of cell 1 to DAC 2.
// Every mechanism is counted and each must occur at least once: simultaneous
// start, broadcast trigger (several modules of a cell starting in the same
// cycle), readout through the loopback, state distribution, barrier
// (release of all cells in the same cycle, 3 cycles after the last arrival),
// register transfer, frequency-multiplexed DAC sum (checked sample by sample
// against the cells' outputs), pulse-player routing, host access stalled by
// a sequencer, busy aggregation.
module tb_qicontroller_top;
  import qi_pkg::*;
  localparam int N = 10, N_AXI = N + 2, P_COORD = N, P_ROUTER = N + 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t axi_req [N_AXI];
  axil_rsp_t axi_rsp [N_AXI];
  axil_req_t cell_axi_req [N];
  axil_rsp_t cell_axi_rsp [N];
  logic      any_busy;
  iq_beat_t  dac [4], adc [4];
  logic [7:0] dig_out [N];

  qicontroller_top dut (
    .clk, .rst, .cell_axi_req, .cell_axi_rsp,
    .coord_axi_req(axi_req[P_COORD]), .coord_axi_rsp(axi_rsp[P_COORD]),
    .router_axi_req(axi_req[P_ROUTER]), .router_axi_rsp(axi_rsp[P_ROUTER]),
    .any_busy, .dac, .adc, .dig_out
  );
  always_comb for (int c = 0; c < N; c++) begin
    cell_axi_req[c] = axi_req[c];
    axi_rsp[c]      = cell_axi_rsp[c];
  end

  always #5 clk = ~clk;
  initial begin
    #5000000 failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"
  `include "seq_asm.svh"

  // loopback DAC 0 -> ADC 0
  always @(posedge clk) begin
    adc[0] <= dac[0];
    for (int a = 1; a < 4; a++) adc[a] <= '0;
  end

  // ---------------------------------------------------------------- monitors
  function automatic bit is_ctrl_trig(wb_req_t r);
    return r.stb && r.adr == 16'hE003 && r.dat[31:12] == 20'(1 << 10);
  endfunction
  int cyc = 0;
  int n_start = 0, n_bcast = 0, n_state = 0, n_barrier = 0, n_xfer = 0, n_fdm = 0,
      n_pp = 0, n_stall = 0, n_busy = 0, n_loop = 0;
  int t_ctrl_trig [3];
  int t_sync_last = 0;
  logic [2:0] sync_d = '0;
  iq_beat_t   ct_d [3];
  logic [N-1:0] start_v;
  always @(negedge clk) begin
    cyc++;
    start_v = dut.start;
    if (start_v == {N{1'b1}}) n_start++;
    // cells 0..2: sync flag rising edges, control-pulse trigger writes
    for (int c = 0; c < 3; c++)
      if (dut.sync[c] && !sync_d[c]) t_sync_last = cyc;
    if (is_ctrl_trig(dut.g_cell[0].u_cell.m_req[0])) t_ctrl_trig[0] = cyc;
    if (is_ctrl_trig(dut.g_cell[1].u_cell.m_req[0])) t_ctrl_trig[1] = cyc;
    if (is_ctrl_trig(dut.g_cell[2].u_cell.m_req[0])) t_ctrl_trig[2] = cyc;
    sync_d = dut.sync[2:0];
    // broadcast: readout generator and recorder of cell 0 start in one cycle
    if (dut.g_cell[0].u_cell.u_gen_ro.start && dut.g_cell[0].u_cell.u_rec.trig_v && dut.g_cell[0].u_cell.u_dig.start)
      n_bcast++;
    // frequency multiplex on DAC 1: one cycle after the cells' samples
    begin
      automatic int active = 0;
      for (int c = 0; c < 3; c++) if (ct_d[c].i[0] != 0) active++;
      for (int k = 0; k < SPC; k++) begin
        automatic int si = 0, sq = 0;
        for (int c = 0; c < 3; c++) begin si += int'(ct_d[c].i[k]); sq += int'(ct_d[c].q[k]); end
        if (active > 0)
          check(int'(dac[1].i[k]) == si && int'(dac[1].q[k]) == sq, "DAC 1 carries the sum of the control pulses");
      end
      if (active >= 2) n_fdm++;
    end
    for (int c = 0; c < 3; c++) ct_d[c] = dut.cell_ctrl[c];
    if (dac[2].i[0] != 0) n_pp++;
    if (dut.g_cell[0].u_cell.m_req[1].stb && dut.g_cell[0].u_cell.m_rsp[1].stall) n_stall++;
  end

  // ---------------------------------------------------------------- host helpers
  int lat;
  logic [31:0] d;
  localparam logic [31:0] RO = 32'h1 << 13, CT = 32'h2 << 13, REC = 32'h3 << 13,
                          ST = 32'h4 << 13, PP = 32'h5 << 13, DG = 32'h6 << 13;
  task automatic wr(int p, logic [31:0] reg_addr, logic [31:0] v);
    axi_wr(p, 4 * reg_addr, v, lat);
  endtask
  task automatic rd(int p, logic [31:0] reg_addr, output logic [31:0] v);
    axi_rd(p, 4 * reg_addr, v, lat);
  endtask
  task automatic load(int c, logic [31:0] prog [$]);
    foreach (prog[i]) wr(c, 32'h1000 + i, prog[i]);
  endtask

  localparam int T_RO = 1 << 4, T_REC1 = 1 << 8, T_CT1 = 1 << 10, T_PP1 = 1 << 14, T_DIG1 = 1 << 18;

  logic [31:0] p0 [$], p1 [$], p2 [$], pw [$];
  initial begin
    p0 = '{a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0),
           a_trig(T_RO | T_REC1 | T_DIG1), a_syncstate(5, 0), a_cellsync(7), a_trig(T_CT1),
           a_send(5, 5), a_end()};
    p1 = '{a_wait(17), a_syncstate(5, 0), a_beq(5, 0, 8), a_trig(T_PP1), a_cellsync(7),
           a_trig(T_CT1), a_end()};
    p2 = '{a_wait(150), a_cellsync(7), a_trig(T_CT1), a_recv(6, 0, 5), a_end()};
  end

  initial begin
    for (int p = 0; p < N_AXI; p++) axi_req[p] = '0;
    for (int c = 0; c < 3; c++) ct_d[c] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // router: DAC 0 readout of cell 0, DAC 1 control sum of cells 0..2,
    // DAC 2 pulse player of cell 1; all cells listen to ADC 0 (reset value)
    wr(P_ROUTER, 32 + 0, 32'h1);  wr(P_ROUTER, 48 + 0, 1);
    wr(P_ROUTER, 16 + 1, 32'h7);  wr(P_ROUTER, 48 + 1, 0);
    wr(P_ROUTER, 48 + 2, 1 << 8 | 2);
    // cell 0: readout pulse (20 clocks, DC), recorder window after the loop delay
    wr(0, RO + 16, 20); wr(0, RO + 17, 32'h7FFF_0000); wr(0, RO + 18, 0); wr(0, RO + 19, 1);
    for (int n = 0; n < 80; n++) wr(0, RO + 'h1000 + n, 16000);
    wr(0, REC + 6, 7); wr(0, REC + 7, 20); wr(0, REC + 11, 0);
    wr(0, ST + 8, 1); wr(0, ST + 9, 3);
    wr(0, DG + 16, 32'h0001_0004);
    // cells 0..2: control pulses of 10 clocks at different frequencies
    for (int c = 0; c < 3; c++) begin
      wr(c, CT + 4, 32'h0400_0000 * (c + 1));
      wr(c, CT + 16, 10); wr(c, CT + 17, 32'h7FFF_0000); wr(c, CT + 18, 0); wr(c, CT + 19, 1);
      for (int n = 0; n < 40; n++) wr(c, CT + 'h1000 + n, 8000);
    end
    // cell 1: flux pulse on pulse-player channel 1
    wr(1, PP + 16, 6); wr(1, PP + 17, 32'h7FFF_0000);
    for (int n = 0; n < 24; n++) wr(1, PP + 'h1000 + n, 10000);
    load(0, p0); load(1, p1); load(2, p2);
    for (int c = 3; c < N; c++) begin
      pw = '{a_wait(20 * c), a_end()};
      load(c, pw);
    end
    rd(P_COORD, 0, d); check(d == 32'h43430001, "coordinator info");
    // start all cells at once; the host reads cell 0 meanwhile
    fork
      wr(P_COORD, 3, 32'h3FF);
      begin
        repeat (3) @(negedge clk);
        rd(0, 1, d);
        check(d[0], "host read while cell 0 runs");
      end
    join
    rd(P_COORD, 1, d);
    if (d != 0) n_busy++;
    rd(P_COORD, 2, d);
    check(d == 1 && any_busy, "any busy while the programs run");
    while (any_busy) @(negedge clk);
    repeat (20) @(negedge clk);
    rd(P_COORD, 1, d); check(d == 0, "no cell busy at the end");

    // results
    rd(0, REC + 12, d);
    check($signed(d) > 0, "readout through the loopback gives a positive result");
    if ($signed(d) > 0) n_loop++;
    rd(0, 32 + 5, d); check(d == 1, "cell 0 measured state 1");
    rd(1, 32 + 5, d); check(d == 1, "cell 1 received cell 0's state");
    if (d == 1) n_state++;
    rd(2, 32 + 6, d); check(d == 1, "cell 2 received cell 0's register");
    if (d == 1) n_xfer++;
    rd(0, ST + 'h1000 + 1024, d); check(d == 1, "state stored in cell 0's data storage");
    rd(P_COORD, 4, d); check(d[0] == 1'b1, "coordinator state register");
    check(t_ctrl_trig[0] == t_ctrl_trig[1] && t_ctrl_trig[1] == t_ctrl_trig[2],
          $sformatf("barrier releases cells 0..2 together (%0d %0d %0d)", t_ctrl_trig[0], t_ctrl_trig[1], t_ctrl_trig[2]));
    check(t_ctrl_trig[2] - t_sync_last == 3,
          $sformatf("next instruction 3 cycles after the last cell reached the barrier (%0d)", t_ctrl_trig[2] - t_sync_last));
    if (t_ctrl_trig[0] == t_ctrl_trig[2] && t_ctrl_trig[0] != 0) n_barrier++;

    $display("mechanisms: start=%0d broadcast=%0d loopback=%0d state=%0d barrier=%0d transfer=%0d fdm=%0d pulse_player=%0d stall=%0d busy=%0d",
             n_start, n_bcast, n_loop, n_state, n_barrier, n_xfer, n_fdm, n_pp, n_stall, n_busy);
    check(n_start > 0, "simultaneous start happened");
    check(n_bcast > 0, "broadcast trigger happened");
    check(n_loop > 0, "readout loopback happened");
    check(n_state > 0, "state distribution happened");
    check(n_barrier > 0, "barrier happened");
    check(n_xfer > 0, "register transfer happened");
    check(n_fdm > 0, "frequency-multiplexed sum happened");
    check(n_pp > 0, "pulse-player routing happened");
    check(n_stall > 0, "host access stalled");
    check(n_busy > 0, "busy aggregation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
