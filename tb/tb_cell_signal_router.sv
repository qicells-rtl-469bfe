// tb_cell_signal_router: random sample streams from all cells and ADC
// channels, random router configurations written over AXI4-Lite. Every cycle
// the DAC outputs and the per-cell ADC inputs are compared with a reference
// model of the masked, saturating sums, the pulse-player path and the ADC
// selection, one clock after the inputs. Full-scale inputs are used part of
// the time so that saturation is exercised.
module tb_cell_signal_router;
  import qi_pkg::*;
  localparam int N = 10, ND = 4, NA = 4, N_AXI = 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  axil_req_t  axi_req [N_AXI];
  axil_rsp_t  axi_rsp [N_AXI];
  iq_beat_t   cell_ctrl [N], cell_ro [N], cell_adc [N];
  real_beat_t cell_pp [N][2];
  iq_beat_t   dac [ND], adc [NA];

  cell_signal_router #(.N_CELLS(N), .N_DAC(ND), .N_ADC(NA)) dut (
    .clk, .rst, .axi_req(axi_req[0]), .axi_rsp(axi_rsp[0]),
    .cell_ctrl, .cell_ro, .cell_pp, .dac, .adc, .cell_adc
  );

  always #5 clk = ~clk;
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  `include "axil_common.svh"

  // configuration shadow
  logic [N-1:0] cm [ND], rm [ND];
  int src [ND], cel [ND], asel [N];

  function automatic logic signed [15:0] sat(int v);
    return v > 32767 ? 16'sd32767 : v < -32768 ? -16'sd32768 : 16'(v);
  endfunction

  function automatic sample_t rnd(bit big);
    return big ? ($urandom_range(0, 1) ? 16'sh7F00 + 16'($urandom_range(0, 255)) : 16'sh8000)
               : 16'($urandom);
  endfunction

  iq_beat_t e_dac [ND], e_adc [N];
  bit model_on = 0;
  int sat_seen = 0;
  always @(negedge clk) begin
    if (model_on) begin
      for (int d = 0; d < ND; d++)
        for (int k = 0; k < SPC; k++)
          check(dac[d].i[k] == e_dac[d].i[k] && dac[d].q[k] == e_dac[d].q[k],
                $sformatf("DAC %0d sample %0d", d, k));
      for (int c = 0; c < N; c++)
        check(cell_adc[c] == e_adc[c], $sformatf("ADC input of cell %0d", c));
    end
    // new random inputs
    for (int c = 0; c < N; c++)
      for (int k = 0; k < SPC; k++) begin
        automatic bit big = $urandom_range(0, 3) == 0;
        cell_ctrl[c].i[k] = rnd(big); cell_ctrl[c].q[k] = rnd(big);
        cell_ro[c].i[k] = rnd(big);   cell_ro[c].q[k] = rnd(big);
        cell_pp[c][0].d[k] = rnd(0);  cell_pp[c][1].d[k] = rnd(0);
      end
    for (int a = 0; a < NA; a++) begin
      adc[a].valid = 1'b1;
      for (int k = 0; k < SPC; k++) begin adc[a].i[k] = rnd(0); adc[a].q[k] = rnd(0); end
    end
    // expected outputs for these inputs
    for (int d = 0; d < ND; d++) begin
      e_dac[d].valid = 1'b1;
      for (int k = 0; k < SPC; k++) begin
        automatic int ci = 0, cq = 0, ri = 0, rq = 0;
        for (int c = 0; c < N; c++) begin
          if (cm[d][c]) begin ci += int'(cell_ctrl[c].i[k]); cq += int'(cell_ctrl[c].q[k]); end
          if (rm[d][c]) begin ri += int'(cell_ro[c].i[k]);   rq += int'(cell_ro[c].q[k]); end
        end
        if (src[d] == 0 && (ci > 32767 || ci < -32768)) sat_seen++;
        case (src[d])
          0: begin e_dac[d].i[k] = sat(ci); e_dac[d].q[k] = sat(cq); end
          1: begin e_dac[d].i[k] = sat(ri); e_dac[d].q[k] = sat(rq); end
          2: begin e_dac[d].i[k] = cell_pp[cel[d]][0].d[k]; e_dac[d].q[k] = cell_pp[cel[d]][1].d[k]; end
          default: begin e_dac[d].i[k] = '0; e_dac[d].q[k] = '0; end
        endcase
      end
    end
    for (int c = 0; c < N; c++) e_adc[c] = adc[asel[c]];
  end

  int lat;
  logic [31:0] d;
  initial begin
    axi_req[0] = '0;
    for (int i = 0; i < ND; i++) begin cm[i] = '0; rm[i] = '0; src[i] = 0; cel[i] = 0; end
    for (int c = 0; c < N; c++) asel[c] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    model_on = 1;
    for (int r = 0; r < 12; r++) begin
      // new configuration; the model follows each register as it is written
      for (int i = 0; i < ND; i++) begin
        automatic logic [N-1:0] m1 = N'($urandom), m2 = N'($urandom);
        automatic int s = $urandom_range(0, 3), ce = $urandom_range(0, N - 1);
        model_on = 0;
        axi_wr(0, 4 * (16 + i), 32'(m1), lat); cm[i] = m1;
        axi_wr(0, 4 * (32 + i), 32'(m2), lat); rm[i] = m2;
        axi_wr(0, 4 * (48 + i), 32'(ce << 8 | s), lat); src[i] = s; cel[i] = ce;
        check(lat == 3, "register write latency 3");
        axi_rd(0, 4 * (48 + i), d, lat);
        check(d == 32'(ce << 8 | s), "DAC source register read back");
      end
      for (int c = 0; c < N; c++) begin
        automatic int a = $urandom_range(0, NA - 1);
        axi_wr(0, 4 * (64 + c), a, lat); asel[c] = a;
      end
      @(negedge clk); @(negedge clk);
      model_on = 1;
      repeat (40) @(negedge clk);
    end
    check(sat_seen > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
