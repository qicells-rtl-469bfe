// tb_pulse_player: triggers both channels in the same trigger word with
// different sets and checks every output sample at the exact clock against
// a fixed-point model (sample * amplitude * calibration), the return to zero
// of one channel, hold on the other, per-channel calibration, and that the
// two 2-bit fields address the channels independently.
module tb_pulse_player;
  import qi_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  logic       busy;
  real_beat_t out [2];

  pulse_player #(.N_SETS(3), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int smp(int ch, int n); return ch == 0 ? 100 * (n + 1) : -200 * (n + 1); endfunction
  function automatic int model(int s, int amp, int g); return (((s * amp) >>> 15) * g) >>> 15; endfunction

  task automatic expect_row(input int ch, input int first, input int amp, input int g, input string what);
    for (int k = 0; k < SPC; k++)
      check(out[ch].d[k] == 16'(model(smp(ch, first + k), amp, g)),
            $sformatf("%s: ch %0d sample %0d", what, ch, k));
  endtask

  int g0 = 32767, g1 = 32767;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 16; n++) wb_wr(16'h1000 + 16'(n), 32'(smp(0, n)));
    for (int n = 0; n < 16; n++) wb_wr(16'h1000 + D + 16'(n), 32'(smp(1, n)));
    wb_wr(16'd16, 32'd2);                         // ch1 set 1: 2 rows
    wb_wr(16'd17, {16'h7fff, 16'd0});             //   from row 0, amplitude ~1
    wb_wr(16'd24 + 4, {1'b1, 15'b0, 16'd3});      // ch2 set 3: 3 rows, hold
    wb_wr(16'd25 + 4, {16'h4000, 16'd1});         //   from row 1, amplitude 0.5
    // both channels in one trigger word: ch1 set 1, ch2 set 3
    wb_trig(20'((3 << 2 | 1)) << 14);
    repeat (4) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      if (r < 2) expect_row(0, 4 * r, 32767, g0, "ch1 pulse");
      else for (int k = 0; k < SPC; k++) check(out[0].d[k] == 0, "ch1 back to zero");
      expect_row(1, 4 * (r + 1), 16'h4000, g1, "ch2 pulse");
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int k = 0; k < SPC; k++)
      check(out[1].d[k] == 16'(model(smp(1, 15), 16'h4000, g1)), "ch2 holds its last sample");
    check(!busy, "idle after the pulses");
    // calibration on ch1, trigger ch1 only: ch2 keeps holding
    g0 = 16'h2000;
    wb_wr(16'd4, {16'(g1), 16'(g0)});
    wb_trig(20'(1) << 14);
    repeat (4) @(negedge clk);
    expect_row(0, 0, 32767, g0, "ch1 calibrated");
    for (int k = 0; k < SPC; k++)
      check(out[1].d[k] == 16'(model(smp(1, 15), 16'h4000, g1)), "ch2 unaffected by ch1 trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
