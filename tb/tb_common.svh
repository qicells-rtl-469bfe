// tb_common.svh: checking and Wishbone access tasks shared by the slave
// testbenches. The including module declares clk, wb_req (wb_req_t),
// wb_rsp (wb_rsp_t), and the integers checks and failures. Stimulus is
// applied at the falling clock edge.

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

// Write one register; the slave must acknowledge exactly two cycles later.
task automatic wb_wr(input logic [15:0] a, input logic [31:0] d);
  @(negedge clk);
  wb_req = '{stb: 1'b1, we: 1'b1, adr: a, dat: d};
  @(negedge clk);
  wb_req = '0;
  check(!wb_rsp.ack, "no ack one cycle after a write");
  @(negedge clk);
  check(wb_rsp.ack, "ack two cycles after a write");
endtask

// Read one register, checking the fixed two-cycle response.
task automatic wb_rd(input logic [15:0] a, output logic [31:0] d);
  @(negedge clk);
  wb_req = '{stb: 1'b1, we: 1'b0, adr: a, dat: '0};
  @(negedge clk);
  wb_req = '0;
  check(!wb_rsp.ack, "no ack one cycle after a read");
  @(negedge clk);
  check(wb_rsp.ack, "ack two cycles after a read");
  d = wb_rsp.dat;
endtask

// Write a trigger word to the trigger register (as a broadcast would).
task automatic wb_trig(input logic [19:0] t);
  @(negedge clk);
  wb_req = '{stb: 1'b1, we: 1'b1, adr: 16'hE003, dat: {t, 12'h0}};
  @(negedge clk);
  wb_req = '0;
endtask
