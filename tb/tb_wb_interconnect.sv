// tb_wb_interconnect: two masters and seven modelled slaves (each answering
// exactly two cycles after a request). Checks the 4-cycle read latency from
// the accepting cycle, data routing by the upper address bits, priority of
// master 0 with stall of master 1, pipelined back-to-back requests, and that
// a broadcast write reaches all slaves in the same cycle.
module tb_wb_interconnect;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  wb_req_t m_req [2];
  wb_rsp_t m_rsp [2];
  wb_req_t s_req [7];
  wb_rsp_t s_rsp [7];

  wb_interconnect #(.N_SLV(7)) dut (.*);

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // slave models: register r of slave s reads as (s << 16 | r) until written
  logic [31:0] wr_val [7];
  int          wr_cyc [7];
  for (genvar s = 0; s < 7; s++) begin : g_s
    logic p_v, p_we, a_v;
    logic [12:0] p_a;
    logic [31:0] p_d, a_d;
    always_ff @(posedge clk) begin
      p_v <= s_req[s].stb && !rst; p_we <= s_req[s].we; p_a <= s_req[s].adr[12:0]; p_d <= s_req[s].dat;
      a_v <= p_v;
      a_d <= p_we ? 32'h0 : (32'(s) << 16 | 32'(p_a));
      if (p_v && p_we) begin wr_val[s] <= p_d; wr_cyc[s] <= cyc; end
    end
    assign s_rsp[s] = '{ack: a_v, stall: 1'b0, dat: a_d};
  end

  // response monitors
  int ack_cyc [2][$];
  logic [31:0] ack_dat [2][$];
  always @(negedge clk)
    for (int m = 0; m < 2; m++)
      if (m_rsp[m].ack) begin ack_cyc[m].push_back(cyc); ack_dat[m].push_back(m_rsp[m].dat); end

  function automatic wb_req_t rd(int s, int r);
    return '{stb: 1'b1, we: 1'b0, adr: 16'(s << 13 | r), dat: '0};
  endfunction

  int t;
  initial begin
    m_req[0] = '0; m_req[1] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // single read by master 0
    @(negedge clk); m_req[0] = rd(3, 5); t = cyc;
    @(negedge clk); m_req[0] = '0;
    repeat (5) @(negedge clk);
    check(ack_cyc[0].size() == 1 && ack_cyc[0][0] == t + 4, "master 0 read answered after 4 cycles");
    check(ack_dat[0][0] == (3 << 16 | 5), "read data routed from slave 3");
    // pipelined reads, one per cycle, from different slaves
    @(negedge clk); t = cyc;
    for (int i = 0; i < 5; i++) begin m_req[0] = rd(i, 10 + i); @(negedge clk); end
    m_req[0] = '0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 5; i++)
      check(ack_cyc[0][1 + i] == t + 4 + i && ack_dat[0][1 + i] == (i << 16 | (10 + i)),
            $sformatf("pipelined read %0d", i));
    // conflict: both request in the same cycle; master 1 is stalled
    @(negedge clk); m_req[0] = rd(1, 1); m_req[1] = rd(2, 2); t = cyc; #1;
    check(m_rsp[1].stall && !m_rsp[0].stall, "master 1 stalled while master 0 requests");
    @(negedge clk); m_req[0] = '0; #1;
    check(!m_rsp[1].stall, "master 1 accepted in the next cycle");
    @(negedge clk); m_req[1] = '0;
    repeat (6) @(negedge clk);
    check(ack_cyc[0][6] == t + 4, "master 0 first");
    check(ack_cyc[1].size() == 1 && ack_cyc[1][0] == t + 5 && ack_dat[1][0] == (2 << 16 | 2),
          "master 1 answered one cycle later with its own data");
    // broadcast write
    @(negedge clk); m_req[0] = '{stb: 1'b1, we: 1'b1, adr: 16'hE003, dat: 32'hCAFE0000}; t = cyc;
    @(negedge clk); m_req[0] = '0;
    repeat (5) @(negedge clk);
    for (int s = 0; s < 7; s++)
      check(wr_val[s] == 32'hCAFE0000 && wr_cyc[s] == t + 2, $sformatf("broadcast reached slave %0d", s));
    check(ack_cyc[0].size() == 8 && ack_cyc[0][7] == t + 4, "broadcast acknowledged once");
    // a write to one slave reaches only that slave
    @(negedge clk); m_req[1] = '{stb: 1'b1, we: 1'b1, adr: 16'h4003, dat: 32'h1234}; t = cyc;
    @(negedge clk); m_req[1] = '0;
    repeat (5) @(negedge clk);
    for (int s = 0; s < 7; s++)
      check(wr_val[s] == (s == 2 ? 32'h1234 : 32'hCAFE0000), $sformatf("unicast write, slave %0d", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
