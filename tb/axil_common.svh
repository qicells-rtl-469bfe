// axil_common.svh: AXI4-Lite master tasks shared by testbenches. The
// including module declares clk, N_AXI, axi_req[N_AXI] (axil_req_t),
// axi_rsp[N_AXI] (axil_rsp_t) and a check() task. Stimulus is applied at the
// falling clock edge. Each task returns the number of cycles from the
// handshake to the response in lat.

task automatic axi_wr(input int p, input logic [31:0] a, input logic [31:0] d, output int lat);
  @(negedge clk);
  axi_req[p].awvalid = 1'b1; axi_req[p].awaddr = AXIL_ADDR_W'(a);
  axi_req[p].wvalid  = 1'b1; axi_req[p].wdata  = d;
  axi_req[p].bready  = 1'b1;
  #1;
  while (!axi_rsp[p].awready) begin @(negedge clk); #1; end
  @(negedge clk);
  axi_req[p].awvalid = 1'b0; axi_req[p].wvalid = 1'b0;
  lat = 1;
  #1;
  while (!axi_rsp[p].bvalid) begin @(negedge clk); lat++; #1; end
  check(axi_rsp[p].bresp == 2'b00, "write response OKAY");
  @(negedge clk);
  axi_req[p].bready = 1'b0;
endtask

task automatic axi_rd(input int p, input logic [31:0] a, output logic [31:0] d, output int lat);
  @(negedge clk);
  axi_req[p].arvalid = 1'b1; axi_req[p].araddr = AXIL_ADDR_W'(a);
  axi_req[p].rready  = 1'b1;
  #1;
  while (!axi_rsp[p].arready) begin @(negedge clk); #1; end
  @(negedge clk);
  axi_req[p].arvalid = 1'b0;
  lat = 1;
  #1;
  while (!axi_rsp[p].rvalid) begin @(negedge clk); lat++; #1; end
  d = axi_rsp[p].rdata;
  check(axi_rsp[p].rresp == 2'b00, "read response OKAY");
  @(negedge clk);
  axi_req[p].rready = 1'b0;
endtask
