// tb_axil_wb_bridge: drives AXI4-Lite writes and reads into the bridge and
// models the Wishbone interconnect behind it (ack four cycles after the
// accepted request, optional stall). Checks the byte-to-register address
// translation, the data in both directions, that the request is held while
// stalled, and the response latency: B/R valid 6 cycles after the handshake
// without stall, one more per stalled cycle.
module tb_axil_wb_bridge;
  import qi_pkg::*;
  localparam int N_AXI = 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t axi_req [N_AXI];
  axil_rsp_t axi_rsp [N_AXI];
  wb_req_t   m_req;
  wb_rsp_t   m_rsp;

  axil_wb_bridge dut (.clk, .rst, .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]), .m_req, .m_rsp);

  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"

  // bus model
  int stall_cycles = 0;
  logic [4:0] pipe_v;
  logic [31:0] pipe_d [5];
  logic [15:0] last_adr;
  logic [31:0] last_wdat;
  logic        last_we;
  int          n_acc = 0;
  logic        stalled;
  assign stalled = stall_cycles > 0;
  always_ff @(posedge clk) begin
    if (m_req.stb && stalled) stall_cycles <= stall_cycles - 1;
    pipe_v <= {pipe_v[3:0], m_req.stb && !stalled};
    for (int i = 4; i > 0; i--) pipe_d[i] <= pipe_d[i-1];
    pipe_d[0] <= {16'hB0B0, m_req.adr};
    if (m_req.stb && !stalled) begin
      last_adr <= m_req.adr; last_wdat <= m_req.dat; last_we <= m_req.we; n_acc <= n_acc + 1;
    end
  end
  // ack four cycles after acceptance (cycle c accepted -> pipe_v[3] in c+4)
  assign m_rsp = '{ack: pipe_v[3], stall: stalled, dat: pipe_v[3] ? pipe_d[3] : 32'h0};

  logic [31:0] d;
  int lat;
  initial begin
    axi_req[0] = '0; pipe_v = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    axi_wr(0, 32'h0000_8014, 32'h1234_5678, lat);
    check(lat == 6, $sformatf("write latency 6 (got %0d)", lat));
    check(last_we && last_adr == 16'h2005 && last_wdat == 32'h1234_5678, "write address / data translated");
    axi_rd(0, 32'h0000_C008, d, lat);
    check(lat == 6, $sformatf("read latency 6 (got %0d)", lat));
    check(!last_we && last_adr == 16'h3002 && d == 32'hB0B0_3002, "read address / data");
    // random addresses, some stalled
    for (int i = 0; i < 40; i++) begin
      automatic logic [15:0] a = 16'($urandom);
      automatic int s = $urandom_range(0, 3);
      automatic int n0 = n_acc;
      stall_cycles = s;
      if (i % 2 == 0) begin
        axi_wr(0, {14'b0, a, 2'b00}, 32'(i), lat);
        check(last_we && last_adr == a && last_wdat == 32'(i), "random write");
      end else begin
        axi_rd(0, {14'b0, a, 2'b00}, d, lat);
        check(!last_we && d == {16'hB0B0, a}, "random read");
      end
      check(lat == 6 + s, $sformatf("latency with %0d stall cycles (got %0d)", s, lat));
      check(n_acc == n0 + 1, "exactly one bus access per AXI access");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
