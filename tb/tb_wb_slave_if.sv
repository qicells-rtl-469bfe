// tb_wb_slave_if: checks the common slave register interface: the fixed
// two-cycle answer, the info register, the register strobes seen by the
// owning module, and the decoding of the trigger word.
module tb_wb_slave_if;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  wb_req_t wb_req = '0;
  wb_rsp_t wb_rsp;
  int checks = 0, failures = 0;
  `include "tb_common.svh"

  logic                  reg_wr, reg_rd, trig_valid;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(16'hABCD), .SLAVE_VERSION(16'h0007)) dut (.*);

  // model of the owning module: register value = 3 * index
  always_ff @(posedge clk) rdata <= reg_rd ? 32'(reg_addr) * 3 : 32'h0;

  // record write strobes
  logic [REG_ADDR_W-1:0] last_wa;
  logic [31:0]           last_wd;
  int                    n_wr = 0, n_trig = 0;
  trig_word_t            last_trig;
  always @(posedge clk) begin
    if (reg_wr) begin last_wa <= reg_addr; last_wd <= reg_wdata; n_wr++; end
    if (trig_valid) begin last_trig <= trig; n_trig++; end
    if (!rst) check(!wb_rsp.stall, "slave never stalls");
  end

  always #5 clk = ~clk;

  initial begin
    #20000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wb_rd(16'h0000, d);
    check(d == 32'hABCD0007, "info register holds ID and version");
    for (int a = 1; a < 40; a += 7) begin
      wb_rd(16'(a), d);
      check(d == 32'(a) * 3, $sformatf("read of register %0d", a));
    end
    wb_wr(16'h0025, 32'hDEADBEEF);
    check(last_wa == 13'h25 && last_wd == 32'hDEADBEEF, "write strobe address and data");
    check(n_trig == 0, "plain write is no trigger");
    // broadcast trigger word with every field distinct
    wb_wr(16'hE003, {2'd3, 4'd9, 4'd5, 2'd2, 4'd11, 1'b0, 1'b1, 1'b0, 1'b1, 12'h0});
    check(n_trig == 1, "trigger register write gives one trigger pulse");
    check(last_trig.dig_trig == 3 && last_trig.pulse_player == 9 && last_trig.ctrl_gen == 5 &&
          last_trig.recorder == 2 && last_trig.readout_gen == 11 && last_trig.sync &&
          !last_trig.start && last_trig.reset, "trigger word fields");
    // back-to-back pipelined reads: one per cycle, each answered 2 cycles later
    @(negedge clk); wb_req = '{stb: 1'b1, we: 1'b0, adr: 16'd5, dat: '0};
    @(negedge clk); wb_req = '{stb: 1'b1, we: 1'b0, adr: 16'd6, dat: '0};
    @(negedge clk); wb_req = '0;
    check(wb_rsp.ack && wb_rsp.dat == 15, "first pipelined read answered");
    @(negedge clk);
    check(wb_rsp.ack && wb_rsp.dat == 18, "second pipelined read answered next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
