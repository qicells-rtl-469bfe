// tb_vna_sweep: one cell used like a vector network analyser, the way the
// readout resonators are first located. The readout generator plays a
// continuous tone (hold option) that is looped back to the ADC; the
// sequencer steps the tone frequency and, at each step, records once with the
// recorder's NCO on the tone frequency and once detuned by exactly one turn
// per integration window. Checks: one stored I and Q result per recording,
// a matched recording gives a magnitude close to that of the first step at
// every frequency, and the detuned recording is rejected by the boxcar
// integrator (below 2 % of the matched magnitude).
module tb_vna_sweep;
  import qi_pkg::*;
  localparam int N_AXI = 1, N_STEP = 6, W = 32;
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

  localparam logic [31:0] RO = 32'h1 << 13, REC = 32'h3 << 13, ST = 32'h4 << 13;
  localparam int T_RO = 1 << 4, T_REC = 1 << 8;
  int lat;
  logic [31:0] d, ri, rq;
  real mag [2 * N_STEP];
  task automatic wr(logic [31:0] r, logic [31:0] v); axi_wr(0, 4 * r, v, lat); endtask
  task automatic rd(logic [31:0] r, output logic [31:0] v); axi_rd(0, 4 * r, v, lat); endtask

  // x1 frequency, x2 step, x3 steps left, x4 generator base, x5 recorder base,
  // x6 detuned frequency, x7 one turn per window (2^32 / (4 W))
  logic [31:0] prog [$];
  initial prog = '{
    a_lui(1, 'h01000), a_lui(2, 'h00400), a_addi(3, 0, N_STEP),           // 0..2
    a_lui(4, 'h2), a_lui(5, 'h6), a_lui(7, 'h02000),                      // 3..5
    a_sw(1, 4, 4), a_trig(T_RO),                                          // 6, 7: tone on
    a_sw(1, 4, 4), a_sw(1, 5, 4), a_wait(20), a_trig(T_REC), a_wait(W + 10),  // 8..12: matched
    a_add(6, 1, 7), a_sw(6, 5, 4), a_wait(5), a_trig(T_REC), a_wait(W + 10),  // 13..17: detuned
    a_add(1, 1, 2), a_addi(3, 3, -1), a_bne(3, 0, -48),                   // 18..20: back to 8
    a_end()                                                               // 21
  };

  initial begin
    axi_req[0] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // continuous tone: 4 clocks of envelope, then hold
    wr(RO + 16, 4); wr(RO + 17, 32'h7FFF_0000); wr(RO + 18, 0); wr(RO + 19, 32'h3);
    for (int n = 0; n < 16; n++) wr(RO + 'h1000 + n, 16000);
    wr(REC + 6, 0); wr(REC + 7, W);
    wr(ST + 8, 1); wr(ST + 9, 2);              // memory 0 result I, memory 1 result Q
    foreach (prog[i]) wr(32'h1000 + i, prog[i]);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    rd(ST + 12, d); check(d[15:0] == 2 * N_STEP, $sformatf("I results stored (%0d)", d[15:0]));
    rd(ST + 13, d); check(d[15:0] == 2 * N_STEP, $sformatf("Q results stored (%0d)", d[15:0]));
    for (int i = 0; i < 2 * N_STEP; i++) begin
      rd(ST + 'h1000 + i, ri);
      rd(ST + 'h1000 + 64 + i, rq);
      mag[i] = $sqrt(real'($signed(ri)) ** 2 + real'($signed(rq)) ** 2);
    end
    for (int s = 0; s < N_STEP; s++) begin
      check(mag[2 * s] > 0.95 * mag[0] && mag[2 * s] < 1.05 * mag[0],
            $sformatf("step %0d matched magnitude %0f vs %0f", s, mag[2 * s], mag[0]));
      check(mag[2 * s + 1] < 0.02 * mag[2 * s],
            $sformatf("step %0d detuned magnitude %0f rejected", s, mag[2 * s + 1]));
    end
    check(mag[0] > 1.0e5, "matched magnitude is large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
