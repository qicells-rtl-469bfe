// tb_digital_trigger: checks the level of every output at every clock
// against an expected waveform built from the trigger sets: which outputs a
// set drives, their duration, per-output offsets, inversion, the continuous
// option and its end by a later trigger, and the reset trigger.
module tb_digital_trigger;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  logic [7:0] dout;

  digital_trigger #(.N_OUT(8), .N_SETS(3)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected: output o high in cycles [from[o], to[o])
  int from [8], to [8];
  logic [7:0] inv = 8'b0000_0100;

  task automatic run_and_check(input int n, input string what);
    for (int i = 0; i < n; i++) begin
      for (int o = 0; o < 8; o++)
        check(dout[o] == ((cyc >= from[o] && cyc < to[o]) ^ inv[o]),
              $sformatf("%s: output %0d at cycle +%0d", what, o, i));
      @(negedge clk);
    end
  endtask

  int t;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wb_wr(16'd4, 32'(inv));
    wb_wr(16'd9, 32'd3);                               // output 1 offset 3
    wb_wr(16'd16, {1'b0, 7'b0, 8'b0000_0111, 16'd4});  // set 1: outputs 0-2, 4 cycles
    wb_wr(16'd17, {1'b1, 7'b0, 8'b0000_1000, 16'd0});  // set 2: output 3 continuous
    wb_wr(16'd18, {1'b0, 7'b0, 8'b0000_1000, 16'd2});  // set 3: output 3, 2 cycles
    for (int o = 0; o < 8; o++) begin from[o] = 0; to[o] = 0; end
    wb_trig(20'(1) << 18);
    t = cyc;
    from[0] = t + 1; to[0] = t + 5;
    from[1] = t + 4; to[1] = t + 8;
    from[2] = t + 1; to[2] = t + 5;
    run_and_check(12, "set 1");
    wb_trig(20'(2) << 18);
    t = cyc;
    from[3] = t + 1; to[3] = t + 1000;
    run_and_check(30, "set 2 continuous");
    wb_trig(20'(3) << 18);
    t = cyc;
    to[3] = t + 3;                                     // restarted as a 2-cycle pulse
    run_and_check(8, "set 3 ends continuous");
    wb_trig(20'(2) << 18);
    t = cyc;
    from[3] = t + 1; to[3] = t + 1000;
    run_and_check(4, "continuous again");
    wb_trig(20'h00001);
    to[3] = cyc + 1;
    run_and_check(4, "reset trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
