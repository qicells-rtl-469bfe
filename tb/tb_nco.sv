// tb_nco: compares the oscillator's cos/sin outputs for all SPC samples of
// every clock with cos/sin computed in floating point from an independent
// phase model, across frequency changes, output phase offsets, a persistent
// phase adjustment and a synchronisation.
module tb_nco;
  import qi_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic [31:0] freq = 0;
  logic [15:0] phase_off = 0, adj_phase = 0;
  logic sync = 0, adj_valid = 0;
  sample_t [SPC-1:0] cos_o, sin_o;

  nco dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase model: acc of the previous clock and the offset applied then
  longint unsigned acc = 0, acc_prev = 0;
  logic [15:0] off_prev = 0;
  logic [31:0] freq_prev = 0;
  int maxerr = 0;
  always @(posedge clk) begin
    acc_prev <= acc;
    off_prev <= phase_off;
    freq_prev <= freq;
    if (rst || sync) acc <= 0;
    else acc <= (acc + SPC * freq + (adj_valid ? {adj_phase, 16'h0} : 0)) & 64'hffffffff;
  end

  int ncyc = 0;
  always @(posedge clk) ncyc <= rst ? 0 : ncyc + 1;
  always @(negedge clk) if (!rst && ncyc > 2) begin
    for (int k = 0; k < SPC; k++) begin
      real ph, ec, es;
      longint unsigned p;
      p  = (acc_prev + k * freq_prev + {off_prev, 16'h0}) & 64'hffffffff;
      ph = 2.0 * 3.14159265358979 * real'(p) / 4294967296.0;
      ec = 32767.0 * $cos(ph) - real'(cos_o[k]);
      es = 32767.0 * $sin(ph) - real'(sin_o[k]);
      if (ec < 0) ec = -ec;
      if (es < 0) es = -es;
      checks++;
      if (ec > 250.0 || es > 250.0) begin
        failures++;
        if (failures < 10) $display("FAIL: sample %0d cos %0d sin %0d err %f %f", k, cos_o[k], sin_o[k], ec, es);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    freq = 32'h0123_4567;          // arbitrary frequency
    repeat (50) @(negedge clk);
    phase_off = 16'h4000;          // quarter-turn output offset
    repeat (20) @(negedge clk);
    adj_valid = 1; adj_phase = 16'h2000;
    @(negedge clk);
    adj_valid = 0;
    repeat (20) @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;
    freq = 32'hF000_0000;          // negative frequency
    phase_off = 0;
    repeat (50) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
