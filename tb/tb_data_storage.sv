// tb_data_storage: feeds results, states and appended words into the four
// memories with different source selections and checks the stored words,
// the state packing (32 x 1 bit and 10 x 3 bit), the size/empty/full flags,
// overflow when a linear memory is full, wrap-around of a circular memory,
// direct register-space access and clearing by a reset trigger.
module tb_data_storage;
  import qi_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  logic        result_valid = 0, state_valid = 0;
  logic [31:0] result_i = 0, result_q = 0;
  logic [2:0]  state = 0;

  data_storage #(.N_MEM(4), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic result(input logic [31:0] i, input logic [31:0] q);
    @(negedge clk); result_valid = 1; result_i = i; result_q = q;
    @(negedge clk); result_valid = 0;
  endtask
  task automatic st(input logic [2:0] s);
    @(negedge clk); state_valid = 1; state = s;
    @(negedge clk); state_valid = 0;
  endtask

  logic [31:0] d, w1, w3;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wb_wr(16'd8,  32'd1);          // mem0: result I, linear
    wb_wr(16'd9,  32'd4);          // mem1: 32 x 1-bit states
    wb_wr(16'd10, 32'h8 | 32'd6);  // mem2: appended words, circular
    wb_wr(16'd11, 32'd5);          // mem3: 10 x 3-bit states
    wb_rd(16'd12, d);
    check(d[29] && d[15:0] == 0, "memory 0 empty after reset");
    for (int n = 0; n < D + 2; n++) result(32'h1000 + n, 32'h2000 + n);
    wb_rd(16'd12, d);
    check(d[31] && d[30] && !d[29] && d[15:0] == D, $sformatf("memory 0 full with overflow, status %h", d));
    for (int n = 0; n < D; n++) begin
      wb_rd(16'h1000 + 16'(n), d);
      check(d == 32'h1000 + n, $sformatf("memory 0 word %0d", n));
    end
    // states: pattern s(n) = (n*5+1) % 8
    w1 = 0; w3 = 0;
    for (int n = 0; n < 32; n++) begin
      st(3'((n * 5 + 1) % 8));
      w1[n] = ((n * 5 + 1) % 8) & 1;
      if (n < 10) w3[3*n +: 3] = 3'((n * 5 + 1) % 8);
    end
    wb_rd(16'd13, d);
    check(d[15:0] == 1, "one packed 1-bit word");
    wb_rd(16'h1000 + D, d);
    check(d == w1, $sformatf("32 packed states %h want %h", d, w1));
    wb_rd(16'd15, d);
    check(d[15:0] == 3, "three packed 3-bit words after 32 states");
    wb_rd(16'h1000 + 3 * D, d);
    check(d == w3, $sformatf("10 packed states %h want %h", d, w3));
    // circular memory: 20 appends into 16 words
    for (int n = 0; n < 20; n++) wb_wr(16'd4, 32'hA000 + n);
    wb_rd(16'd14, d);
    check(!d[31] && d[30] && d[15:0] == D, "circular memory full without overflow");
    for (int n = 0; n < 4; n++) begin
      wb_rd(16'h1000 + 2 * D + 16'(n), d);
      check(d == 32'hA000 + D + n, "circular memory wrapped");
    end
    wb_rd(16'h1000 + 2 * D + 5, d);
    check(d == 32'hA005, "circular memory older word kept");
    // direct write through the register space
    wb_wr(16'h1000 + 2 * D + 3, 32'h12345678);
    wb_rd(16'h1000 + 2 * D + 3, d);
    check(d == 32'h12345678, "direct register-space write");
    // reset trigger empties everything; then single states and result Q
    wb_trig(20'h00001);
    wb_rd(16'd12, d);
    check(d[29] && !d[31] && d[15:0] == 0, "reset trigger clears memory 0");
    wb_wr(16'd8, 32'd3);
    wb_wr(16'd9, 32'd2);
    st(3'd1); st(3'd0); st(3'd1);
    result(32'h55, 32'h66);
    wb_rd(16'd12, d);
    check(d[15:0] == 3, "three single states");
    wb_rd(16'h1002, d);
    check(d == 1, "single state stored");
    wb_rd(16'h1000 + D, d);
    check(d == 32'h66, "result Q stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
