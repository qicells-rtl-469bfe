// tb_signal_generator: plays pulses from several trigger sets and compares
// every output sample, at the exact clock, with a fixed-point model of
// envelope * amplitude * (cos + j sin) * calibration. Covers the trigger
// latency, duration, separate I/Q envelopes, no_q, hold, a non-persistent and
// a persistent phase offset (virtual Z), NCO synchronisation, calibration and
// a reset trigger.
module tb_signal_generator;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  logic     busy;
  iq_beat_t out;

  signal_generator #(.N_SETS(15), .DEPTH(256), .READOUT(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sh15(int v); return v >>> 15; endfunction
  function automatic int env_i(int n); return 1000 * (n + 1); endfunction   // samples 0..
  function automatic int env_q(int n); return -700 * (n + 1); endfunction   // samples 64..

  // expected output of one sample
  task automatic expect_sample(input int k, input int ei, input int eq, input int amp,
                               input int c, input int s, input int gi, input int gq,
                               input string what);
    int ai, aq, mi, mq, oi, oq;
    ai = sh15(ei * amp); aq = sh15(eq * amp);
    mi = sh15(ai * c - aq * s); mq = sh15(ai * s + aq * c);
    oi = sh15(mi * gi); oq = sh15(mq * gq);
    check(out.i[k] == 16'(oi) && out.q[k] == 16'(oq),
          $sformatf("%s: sample %0d got %0d/%0d want %0d/%0d", what, k, out.i[k], out.q[k], oi, oq));
  endtask

  // play set `set` and check `rows` rows of samples at the exact latency
  task automatic play(input int set, input int rows, input int irow, input int qrow,
                      input bit noq, input int amp, input int c, input int s,
                      input int gi, input int gq, input string what);
    wb_trig(20'(set) << 4);
    repeat (5) @(negedge clk);
    for (int r = 0; r < rows; r++) begin
      for (int k = 0; k < SPC; k++)
        expect_sample(k, env_i(4*(irow + r) + k), noq ? 0 : env_q(4*(qrow + r) - 64 + k), amp, c, s, gi, gq, what);
      @(negedge clk);
    end
  endtask

  logic [31:0] d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 32; n++) wb_wr(16'h1000 + 16'(n), 32'(env_i(n)));
    for (int n = 0; n < 32; n++) wb_wr(16'h1040 + 16'(n), 32'(env_q(n)));
    // set 1: 4 rows, amplitude 0.5, I from row 0, Q from row 16
    wb_wr(16'd16, 32'd4);
    wb_wr(16'd17, {16'h4000, 16'h0000});
    wb_wr(16'd18, {16'd16, 16'd0});
    wb_wr(16'd19, 32'd0);
    // set 2: 2 rows from row 2, no_q, hold, amplitude 0.75
    wb_wr(16'd20, 32'd2);
    wb_wr(16'd21, {16'h6000, 16'h0000});
    wb_wr(16'd22, {16'd16, 16'd2});
    wb_wr(16'd23, 32'b011);
    // set 3: like set 1 with a quarter-turn phase offset
    wb_wr(16'd24, 32'd4);
    wb_wr(16'd25, {16'h4000, 16'h4000});
    wb_wr(16'd26, {16'd16, 16'd0});
    wb_wr(16'd27, 32'd0);
    // set 15: a one-row pulse with persistent quarter-turn phase offset
    wb_wr(16'd72, 32'd1);
    wb_wr(16'd73, {16'h4000, 16'h4000});
    wb_wr(16'd74, {16'd16, 16'd0});
    wb_wr(16'd75, 32'b100);
    wb_rd(16'd25, d);
    check(d == 32'h40004000, "trigger set register reads back");

    play(1, 4, 0, 16, 0, 16'h4000, 32767, 0, 32767, 32767, "set 1");
    for (int k = 0; k < SPC; k++) check(out.i[k] == 0 && out.q[k] == 0, "output returns to zero");
    play(2, 2, 2, 16, 1, 16'h6000, 32767, 0, 32767, 32767, "set 2 no_q");
    repeat (10) @(negedge clk);
    for (int k = 0; k < SPC; k++)
      expect_sample(k, env_i(15), 0, 16'h6000, 32767, 0, 32767, 32767, "set 2 hold");
    play(3, 4, 0, 16, 0, 16'h4000, 0, 32767, 32767, 32767, "set 3 phase offset");
    play(1, 4, 0, 16, 0, 16'h4000, 32767, 0, 32767, 32767, "set 1 after non-persistent offset");
    play(15, 1, 0, 16, 0, 16'h4000, 0, 32767, 32767, 32767, "set 15 persistent");
    play(1, 4, 0, 16, 0, 16'h4000, 0, 32767, 32767, 32767, "set 1 after virtual Z");
    wb_trig(20'h00004);                    // NCO sync
    play(1, 4, 0, 16, 0, 16'h4000, 32767, 0, 32767, 32767, "set 1 after sync");
    wb_wr(16'd5, {16'h7fff, 16'h4000});    // calibration: I gain 0.5
    play(1, 4, 0, 16, 0, 16'h4000, 32767, 0, 16'h4000, 32767, "set 1 calibrated");
    // busy during a pulse, reset trigger stops it
    wb_trig(20'h00010);
    @(negedge clk);
    check(busy, "busy during pulse");
    wb_trig(20'h00001);
    @(negedge clk);
    check(!busy, "reset trigger stops the pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
