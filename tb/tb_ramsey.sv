// tb_ramsey: a Ramsey sequence, the coherence-time experiment, run by one
// digital unit cell. The sequencer loops over a growing free-evolution
// delay: pi/2 control pulse, WAIT-REG-TRIG for the delay, second pi/2 pulse,
// then a readout pulse and a recording whose result is appended to the data
// storage; the delay register grows by a fixed step every iteration and
// the loop counter ends the program. Checks: the spacing of the two control
// pulses follows the delay register to the cycle in every iteration, the
// readout follows the second pulse at a fixed distance, and the storage holds
// one result per iteration. The readout output is looped back to the ADC.
module tb_ramsey;
  import qi_pkg::*;
  localparam int N_AXI = 1, N_IT = 8, D0 = 12, STEP = 5, PULSE = 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t  axi_req [N_AXI];
  axil_rsp_t  axi_rsp [N_AXI];
  iq_beat_t   adc, ro_out, ctrl_out;
  real_beat_t pp_out [2];
  logic [7:0] dig_out;
  logic       start = 0, busy, sync, state_valid, state, data_sync;
  logic [15:0] sync_req = '0, states = '0, state_new = '0, data_sync_req = '0;
  logic [31:0] data_out, data_in = '0;
  logic [3:0]  data_addr;

  qicell #(.ENV_DEPTH(256), .TRACE_DEPTH(256), .STORE_DEPTH(64), .PP_DEPTH(64)) dut (
    .clk, .rst, .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]), .adc, .ro_out, .ctrl_out, .pp_out,
    .dig_out, .start, .busy, .sync, .sync_req, .state_valid, .state, .states, .state_new,
    .data_sync, .data_sync_req, .data_out, .data_addr, .data_in
  );

  always #5 clk = ~clk;
  initial begin
    #3000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"
  `include "seq_asm.svh"

  always @(posedge clk) adc <= ro_out;

  // rising edges of the control and readout envelopes
  int cyc = 0;
  int t_ct [$], t_ro [$];
  bit ct_on = 0, ro_on = 0;
  always @(negedge clk) begin
    cyc++;
    if (ctrl_out.i[0] != 0 && !ct_on) t_ct.push_back(cyc);
    if (ro_out.i[0] != 0 && !ro_on) t_ro.push_back(cyc);
    ct_on = ctrl_out.i[0] != 0; ro_on = ro_out.i[0] != 0;
  end

  localparam logic [31:0] RO = 32'h1 << 13, CT = 32'h2 << 13, REC = 32'h3 << 13, ST = 32'h4 << 13;
  localparam int T_CT = 1 << 10, T_RO = 1 << 4, T_REC = 1 << 8;
  int lat;
  logic [31:0] d;
  task automatic wr(logic [31:0] r, logic [31:0] v); axi_wr(0, 4 * r, v, lat); endtask
  task automatic rd(logic [31:0] r, output logic [31:0] v); axi_rd(0, 4 * r, v, lat); endtask

  // x1 delay, x2 step, x3 iterations left
  logic [31:0] prog [$];
  initial prog = '{
    a_addi(1, 0, D0), a_addi(2, 0, STEP), a_addi(3, 0, N_IT),      // 0..2
    a_trig(T_CT),                                                 // 3: first pi/2
    a_waitrt(1),                                                  // 4: free evolution
    a_trig(T_CT),                                                 // 5: second pi/2
    a_wait(PULSE),                                                // 6
    a_trig(T_RO | T_REC),                                         // 7: measure
    a_wait(60),                                                   // 8: let the qubit relax
    a_add(1, 1, 2), a_addi(3, 3, -1),                             // 9, 10
    a_bne(3, 0, -32),                                             // 11: back to 3
    a_end()                                                       // 12
  };

  initial begin
    axi_req[0] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // pi/2 pulse: PULSE clocks, detuned carrier
    wr(CT + 4, 32'h0147_AE14);                 // 5 MHz at 1 GS/s
    wr(CT + 16, PULSE); wr(CT + 17, 32'h7FFF_0000); wr(CT + 18, 0); wr(CT + 19, 1);
    for (int n = 0; n < 4 * PULSE; n++) wr(CT + 'h1000 + n, 12000);
    wr(RO + 16, 10); wr(RO + 17, 32'h7FFF_0000); wr(RO + 18, 0); wr(RO + 19, 1);
    for (int n = 0; n < 40; n++) wr(RO + 'h1000 + n, 9000);
    wr(REC + 6, 5); wr(REC + 7, 10);
    wr(ST + 8, 1);                             // memory 0: result I
    foreach (prog[i]) wr(32'h1000 + i, prog[i]);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    check(t_ct.size() == 2 * N_IT, $sformatf("two control pulses per iteration (%0d)", t_ct.size()));
    check(t_ro.size() == N_IT, "one readout per iteration");
    for (int i = 0; i < N_IT && 2 * i + 1 < t_ct.size() && i < t_ro.size(); i++) begin
      check(t_ct[2 * i + 1] - t_ct[2 * i] == D0 + i * STEP,
            $sformatf("iteration %0d: pulse spacing %0d, expected %0d", i, t_ct[2 * i + 1] - t_ct[2 * i], D0 + i * STEP));
      check(t_ro[i] - t_ct[2 * i + 1] == PULSE + 1, "readout follows the second pulse");
    end
    rd(ST + 12, d);
    check(d[15:0] == N_IT, $sformatf("one stored result per iteration (%0d)", d[15:0]));
    for (int i = 0; i < N_IT; i++) begin
      rd(ST + 'h1000 + i, d);
      check($signed(d) > 0, "stored result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
