// tb_qicell: one digital unit cell with its readout output looped back to its
// ADC input (one register stage, like a cable) and a one-cell model of the
// cell coordinator. The host (AXI4-Lite through the bridge) configures the
// modules and loads a program; the sequencer then configures one register
// itself (SW), issues a broadcast trigger that starts the readout pulse, the
// recording, a pulse-player pulse and a digital trigger in the same cycle,
// waits for the measured state (SYNC-STATE) and branches on it to play one
// of two control pulses. The program runs twice, with the state threshold
// below and above the measured value. Checks: the fixed latencies from the
// trigger write on the bus to each output, the state decision and the
// conditional pulse, results and states in the data storage, and that a host
// access made while the sequencer drives the bus is stalled but correct.
module tb_qicell;
  import qi_pkg::*;
  localparam int N_AXI = 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t  axi_req [N_AXI];
  axil_rsp_t  axi_rsp [N_AXI];
  iq_beat_t   adc, ro_out, ctrl_out;
  real_beat_t pp_out [2];
  logic [7:0] dig_out;
  logic       start = 0, busy, sync, state_valid, state, data_sync;
  logic [15:0] sync_req, states, state_new, data_sync_req;
  logic [31:0] data_out, data_in;
  logic [3:0]  data_addr;

  qicell #(.IMEM_DEPTH(64), .ENV_DEPTH(256), .TRACE_DEPTH(256), .STORE_DEPTH(64), .PP_DEPTH(64)) dut (
    .clk, .rst, .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]), .adc, .ro_out, .ctrl_out, .pp_out,
    .dig_out, .start, .busy, .sync, .sync_req, .state_valid, .state, .states, .state_new,
    .data_sync, .data_sync_req, .data_out, .data_addr, .data_in
  );

  always #5 clk = ~clk;
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"
  `include "seq_asm.svh"

  // loopback and coordinator model
  always @(posedge clk) begin
    adc           <= ro_out;
    sync_req      <= {15'b0, sync};
    data_sync_req <= {15'b0, data_sync};
    data_in       <= data_out;
    state_new     <= {15'b0, state_valid};
    if (rst) states <= '0; else if (state_valid) states[0] <= state;
  end

  // event monitors (cycle numbers)
  int cyc = 0;
  int t_trig [$], t_ro [$], t_ct [$], t_pp [$], t_dig [$];
  logic [15:0] ct_amp [$];
  int stall_cycles = 0;
  logic ro_on, ct_on, pp_on, dig_on;
  always @(negedge clk) begin
    cyc++;
    if (dut.m_req[0].stb && dut.m_req[0].adr == 16'hE003 && dut.m_req[0].dat[31:12] != 0)
      t_trig.push_back(cyc);
    if (dut.m_req[1].stb && dut.m_rsp[1].stall) stall_cycles++;
    if (ro_out.i[0] != 0 && !ro_on) t_ro.push_back(cyc);
    if (ctrl_out.i[0] != 0 && !ct_on) begin t_ct.push_back(cyc); ct_amp.push_back(ctrl_out.i[0]); end
    if (pp_out[0].d[0] != 0 && !pp_on) t_pp.push_back(cyc);
    if (dig_out[0] && !dig_on) t_dig.push_back(cyc);
    ro_on = ro_out.i[0] != 0; ct_on = ctrl_out.i[0] != 0; pp_on = pp_out[0].d[0] != 0; dig_on = dig_out[0];
  end

  localparam logic [31:0] RO = 32'h1 << 13, CT = 32'h2 << 13, REC = 32'h3 << 13,
                          ST = 32'h4 << 13, PP = 32'h5 << 13, DG = 32'h6 << 13;
  int lat;
  logic [31:0] d, res1;

  task automatic wr(logic [31:0] reg_addr, logic [31:0] v);
    axi_wr(0, 4 * reg_addr, v, lat);
  endtask
  task automatic rd(logic [31:0] reg_addr, output logic [31:0] v);
    axi_rd(0, 4 * reg_addr, v, lat);
  endtask

  task automatic run_program();
    int n0 = t_trig.size();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // host access while the sequencer issues its burst of trigger writes
    rd(1, d);
    check(d[0] == 1'b1, "host read of sequencer status while it runs");
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(t_trig.size() == n0 + 2, "two trigger commands per run");
  endtask

  logic [31:0] prog [$];
  initial begin
    prog = '{
      a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0), a_trig(0),     // 0..5 bus busy
      a_lui(2, 4), a_addi(1, 0, 1000), a_sw(1, 2, 4),                       // 6..8 ctrl freq
      a_trig(1 << 18 | 1 << 14 | 1 << 8 | 1 << 4),                          // 9: dig, pp, rec, ro
      a_syncstate(5, 0), a_bne(5, 0, 12),                                   // 10, 11
      a_trig(2 << 10), a_jal(0, 8),                                         // 12, 13: state 0
      a_trig(1 << 10),                                                      // 14: state 1
      a_end()                                                               // 15
    };
  end

  initial begin
    axi_req[0] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // readout generator: set 1 = 20 clocks, real envelope, DC (frequency 0)
    wr(RO + 16, 20); wr(RO + 17, 32'h7FFF_0000); wr(RO + 18, 0); wr(RO + 19, 1);
    for (int n = 0; n < 80; n++) wr(RO + 'h1000 + n, 16000);
    // control generator: set 1 full, set 2 half amplitude, 4 clocks
    wr(CT + 16, 4); wr(CT + 17, 32'h7FFF_0000); wr(CT + 18, 0); wr(CT + 19, 1);
    wr(CT + 20, 4); wr(CT + 21, 32'h4000_0000); wr(CT + 22, 0); wr(CT + 23, 1);
    for (int n = 0; n < 16; n++) wr(CT + 'h1000 + n, 20000);
    // recorder: window of 20 clocks after 5 clocks of loop delay, threshold 0
    wr(REC + 6, 5); wr(REC + 7, 20); wr(REC + 11, 0);
    // storage: memory 0 result I, memory 1 states
    wr(ST + 8, 1); wr(ST + 9, 3);
    // pulse player channel 1, set 1; digital output 0, set 1
    wr(PP + 16, 4); wr(PP + 17, 32'h7FFF_0000);
    for (int n = 0; n < 16; n++) wr(PP + 'h1000 + n, 12345);
    wr(DG + 16, 32'h0001_000A);
    foreach (prog[i]) wr(32'h1000 + i, prog[i]);
    rd(32'h1000 + 9, d); check(d == prog[9], "program loaded");

    run_program();                                 // threshold 0 -> state 1
    rd(REC + 12, res1);
    check($signed(res1) > 0, $sformatf("positive I result (%0d)", $signed(res1)));
    rd(REC + 17, d); check(d[0] == 1'b1, "state 1 above threshold");
    rd(CT + 4, d);   check(d == 1000, "register written by the sequencer");
    wr(REC + 11, res1);                            // threshold = result -> state 0
    run_program();
    rd(REC + 17, d); check(d[0] == 1'b0, "state 0 at threshold");
    rd(ST + 'h1000 + 0, d);  check(d == res1, "result 1 stored");
    rd(ST + 'h1000 + 1, d);  check(d == res1, "result 2 stored");
    rd(ST + 'h1000 + 64, d); check(d == 1, "state 1 stored");
    rd(ST + 'h1000 + 65, d); check(d == 0, "state 2 stored");
    rd(ST + 12, d);          check(d[15:0] == 2, "two results in memory 0");

    check(t_trig.size() == 4 && t_ro.size() == 2 && t_pp.size() == 2 && t_dig.size() == 2 && t_ct.size() == 2,
          $sformatf("events %0d %0d %0d %0d %0d", t_trig.size(), t_ro.size(), t_pp.size(), t_dig.size(), t_ct.size()));
    for (int r = 0; r < 2; r++) begin
      automatic int t = t_trig[2 * r];
      check(t_ro[r] - t == 7, $sformatf("readout pulse 7 cycles after the trigger write (%0d)", t_ro[r] - t));
      check(t_pp[r] - t == 6, $sformatf("pulse player 6 cycles after the trigger write (%0d)", t_pp[r] - t));
      check(t_dig[r] - t == 3, $sformatf("digital output 3 cycles after the trigger write (%0d)", t_dig[r] - t));
      check(t_ct[r] - t_trig[2 * r + 1] == 7, "control pulse 7 cycles after its trigger write");
    end
    check(ct_amp.size() == 2 && ct_amp[0] > ct_amp[1] && ct_amp[1] != 0,
          "conditional control pulse: full amplitude after state 1, half after state 0");
    check(stall_cycles > 0, $sformatf("host access stalled by the sequencer (%0d cycles)", stall_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
