// tb_signal_recorder: drives a changing ADC pattern and checks, against a
// model computed in the testbench, the conditioned time trace, the integrated
// I/Q result of each window (including its position after the trigger
// offset and the exact clock the result appears), the state estimate, the
// SINGLE / ONESHOT / CONTINUOUS modes, the DDC phase, and the averaging
// registers with their reset.
module tb_signal_recorder;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  iq_beat_t    adc;
  logic        busy, result_valid, state_valid, state, state_store;
  logic [31:0] result_i, result_q;

  signal_recorder #(.TRACE_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int pat_i(int c, int k); return 50 * (c % 40) + 7 * k - 900; endfunction
  function automatic int pat_q(int c, int k); return -30 * (c % 30) + 3 * k + 200; endfunction

  always @(negedge clk)
    for (int k = 0; k < SPC; k++) begin
      adc.i[k] = 16'(pat_i(cyc, k));
      adc.q[k] = 16'(pat_q(cyc, k));
    end
  initial adc.valid = 1'b1;

  // configuration mirrored in the model
  int m11 = 16384, m12 = 0, m21 = 0, m22 = 16384, oi = 0, oq = 0;
  int cs = 32767, sn = 0;

  function automatic int cond_i(int c, int k);
    return (m11 * (pat_i(c, k) - oi) + m12 * (pat_q(c, k) - oq)) >>> 14;
  endfunction
  function automatic int cond_q(int c, int k);
    return (m21 * (pat_i(c, k) - oi) + m22 * (pat_q(c, k) - oq)) >>> 14;
  endfunction

  // monitors
  int res_cyc [$], st_cyc [$];
  logic [31:0] res_i_q [$], res_q_q [$];
  logic st_q [$];
  int n_store = 0;
  always @(negedge clk) begin
    if (result_valid) begin res_cyc.push_back(cyc); res_i_q.push_back(result_i); res_q_q.push_back(result_q); end
    if (state_valid)  begin st_cyc.push_back(cyc); st_q.push_back(state); end
    if (state_store) n_store++;
  end

  // expected sums of the window of `dur` beats starting at cycle `first`
  task automatic expect_window(input int first, input int dur, output longint ei, output longint eq);
    ei = 0; eq = 0;
    for (int c = first; c < first + dur; c++)
      for (int k = 0; k < SPC; k++) begin
        ei += (cond_i(c, k) * cs + cond_q(c, k) * sn) >>> 15;
        eq += (cond_q(c, k) * cs - cond_i(c, k) * sn) >>> 15;
      end
  endtask

  int t, dur, off;
  longint ei, eq, sum_i;
  logic [31:0] d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    dur = 5; off = 3;
    wb_wr(16'd6, 32'(off));
    wb_wr(16'd7, 32'(dur));
    wb_wr(16'd11, 32'd0);                        // threshold 0
    // ---- SINGLE
    wb_trig(20'(REC_SINGLE) << 8);
    t = cyc;
    repeat (off + dur + 6) @(negedge clk);
    expect_window(t + 1 + off, dur, ei, eq);
    check(res_cyc.size() == 1, "SINGLE gives one result");
    check(res_cyc[0] == t + off + dur + 4, $sformatf("result latency: at %0d want %0d", res_cyc[0], t + off + dur + 4));
    check($signed(res_i_q[0]) == ei && $signed(res_q_q[0]) == eq,
          $sformatf("SINGLE result %0d/%0d want %0d/%0d", $signed(res_i_q[0]), $signed(res_q_q[0]), ei, eq));
    check(st_q.size() == 1 && st_q[0] == (ei > 0), "state estimate");
    sum_i = ei;
    // time trace of the first window (conditioned samples)
    for (int n = 0; n < 8; n++) begin
      wb_rd(16'h1000 + 16'(n), d);
      check(d == {16'(cond_q(t + 1 + off + n / 4, n % 4)), 16'(cond_i(t + 1 + off + n / 4, n % 4))},
            $sformatf("time trace sample %0d", n));
    end
    // ---- ONESHOT with a threshold above the result: state 0, no storage
    wb_wr(16'd11, 32'(ei + 1));
    wb_trig(20'(REC_ONESHOT) << 8);
    t = cyc;
    repeat (off + dur + 6) @(negedge clk);
    expect_window(t + 1 + off, dur, ei, eq);
    check(res_cyc.size() == 1, "ONESHOT result not forwarded to storage");
    check(st_q.size() == 2 && st_cyc[1] == t + off + dur + 4, "ONESHOT still reports a state");
    check(st_q[1] == (ei > sum_i + 1), "ONESHOT state estimate");
    sum_i += ei;
    // ---- conditioning matrix, offsets and DDC phase
    m12 = -8192; m21 = 4096; oi = 25; oq = -40;
    wb_wr(16'd8, {16'(m12), 16'(m11)});
    wb_wr(16'd9, {16'(m22), 16'(m21)});
    wb_wr(16'd10, {16'(oq), 16'(oi)});
    wb_wr(16'd5, 32'h4000);                      // quarter turn: cos 0, sin 1
    cs = 0; sn = 32767;
    wb_trig(20'(REC_SINGLE) << 8);
    t = cyc;
    repeat (off + dur + 6) @(negedge clk);
    expect_window(t + 1 + off, dur, ei, eq);
    check(res_cyc.size() == 2 && $signed(res_i_q[1]) == ei && $signed(res_q_q[1]) == eq,
          $sformatf("conditioned + rotated result %0d/%0d want %0d/%0d", $signed(res_i_q[1]), $signed(res_q_q[1]), ei, eq));
    sum_i += ei;
    // ---- CONTINUOUS: back-to-back windows until the second CONTINUOUS trigger
    wb_trig(20'(REC_CONTINUOUS) << 8);
    t = cyc;
    repeat (off + 4 * dur + 1) @(negedge clk);
    wb_trig(20'(REC_CONTINUOUS) << 8);
    repeat (3 * dur + 8) @(negedge clk);
    check(!busy, "CONTINUOUS stopped by the second trigger");
    check(res_cyc.size() >= 6, $sformatf("CONTINUOUS gives consecutive results (%0d)", res_cyc.size() - 2));
    for (int w = 0; w < 4; w++) begin
      expect_window(t + 1 + off + w * dur, dur, ei, eq);
      check(res_cyc[2 + w] == t + off + (w + 1) * dur + 4 && $signed(res_i_q[2 + w]) == ei,
            $sformatf("CONTINUOUS window %0d", w));
    end
    for (int w = 2; w < res_cyc.size(); w++) sum_i += $signed(res_i_q[w]);
    // ---- averaging
    wb_rd(16'd16, d);
    check(d == 32'(st_q.size()), $sformatf("average count %0d want %0d", d, st_q.size()));
    wb_rd(16'd14, d);
    check($signed(d) == sum_i, "averaged I sum");
    wb_trig(20'h00001);
    wb_rd(16'd16, d);
    check(d == 0, "reset trigger clears the averaging");
    check(n_store == res_cyc.size(), "states stored exactly for stored results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
