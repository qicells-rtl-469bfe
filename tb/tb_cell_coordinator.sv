// tb_cell_coordinator: drives random per-cell flags, states and data into the
// coordinator and compares every output with a one-cycle-delayed reference
// model: barrier vector, data-sync vector, state vector and new flags, the
// per-cell data multiplexer, busy aggregation. Also checks the register
// interface: info, busy vector, any-busy, stored states, and that a write of
// a start mask pulses exactly the masked cells for one cycle.
module tb_cell_coordinator;
  import qi_pkg::*;
  localparam int N = 10, M = 16, CW = 4, N_AXI = 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t axi_req [N_AXI];
  axil_rsp_t axi_rsp [N_AXI];
  logic          any_busy;
  logic [N-1:0]  busy, start, sync, state, state_valid, data_sync;
  logic [M-1:0]  sync_req, states, state_new, data_sync_req;
  logic [31:0]   data_out [N];
  logic [CW-1:0] data_addr [N];
  logic [31:0]   data_recv [N];

  cell_coordinator #(.N_CELLS(N), .MAX_CELLS(M)) dut (
    .clk, .rst, .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]), .any_busy, .busy, .start,
    .sync, .sync_req, .state, .state_valid, .states, .state_new, .data_sync,
    .data_sync_req, .data_out, .data_addr, .data_recv
  );

  always #5 clk = ~clk;
  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"

  // reference model (one cycle behind the inputs)
  logic [M-1:0] e_sync, e_dsync, e_new, e_states;
  logic [31:0]  e_recv [N];
  logic         e_any;
  bit           model_on = 0;
  always @(posedge clk) begin
    if (rst) begin
      e_states <= '0;
    end else begin
      e_sync  <= M'(sync);
      e_dsync <= M'(data_sync);
      e_new   <= M'(state_valid);
      e_any   <= |busy;
      for (int c = 0; c < N; c++) begin
        if (state_valid[c]) e_states[c] <= state[c];
        e_recv[c] <= data_addr[c] < N ? data_out[data_addr[c]] : 32'h0;
      end
    end
  end
  always @(negedge clk) if (model_on) begin
    check(sync_req == e_sync, "barrier vector");
    check(data_sync_req == e_dsync, "data-sync vector");
    check(state_new == e_new, "state new flags");
    check(states == e_states, "state vector");
    check(any_busy == e_any, "any busy");
    for (int c = 0; c < N; c++) check(data_recv[c] == e_recv[c], $sformatf("data mux of cell %0d", c));
    check(start == '0 || start == 10'h2A5, "start only on register write");
  end

  bit rand_on = 0;
  always @(negedge clk) if (rand_on) begin
    busy = N'($urandom); sync = N'($urandom); data_sync = N'($urandom);
    state = N'($urandom); state_valid = N'($urandom) & N'($urandom);
    for (int c = 0; c < N; c++) begin data_out[c] = $urandom; data_addr[c] = CW'($urandom); end
  end

  int start_seen = 0, start_cyc = -1, cyc = 0;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (start != 0) begin start_seen++; start_cyc = cyc; end
  end

  logic [31:0] d;
  int lat;
  initial begin
    axi_req[0] = '0; busy = '0; sync = '0; data_sync = '0; state = '0; state_valid = '0;
    for (int c = 0; c < N; c++) begin data_out[c] = '0; data_addr[c] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); @(negedge clk);
    model_on = 1; rand_on = 1;
    repeat (300) @(negedge clk);
    rand_on = 0;
    busy = 10'h201; state_valid = 10'h3FF; state = 10'h155;
    @(negedge clk); state_valid = '0;
    repeat (3) @(negedge clk);
    axi_rd(0, 32'h0, d, lat);  check(d == 32'h43430001, "info register");
    check(lat == 3, $sformatf("register read latency 3 (got %0d)", lat));
    axi_rd(0, 32'h4, d, lat);  check(d == 32'h201, "busy vector register");
    axi_rd(0, 32'h8, d, lat);  check(d == 32'h1, "any-busy register");
    axi_rd(0, 32'h10, d, lat); check(d == 32'h155, "state register");
    busy = '0;
    @(negedge clk);
    axi_wr(0, 32'hC, 32'h2A5, lat);
    check(start_seen == 1, $sformatf("start pulse lasts one cycle (%0d)", start_seen));
    repeat (2) @(negedge clk);
    axi_rd(0, 32'h8, d, lat);  check(d == 32'h0, "nothing busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
