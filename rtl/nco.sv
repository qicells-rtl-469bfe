// nco: numerically controlled oscillator giving cos and sin for SPC
// consecutive samples per clock.
//
// A 32-bit phase accumulator holds the phase of the first sample of the
// current clock; it advances by SPC*freq each clock, so sample k of the clock
// has phase acc + k*freq. A 16-bit phase offset (one full turn = 2^16) is
// added to every sample. The top LUT_BITS of each phase address a sine table
// (computed at elaboration from $sin, the same table read a quarter turn
// ahead gives the cosine). Amplitude is 32767.
//
// Controls: sync clears the accumulator (the trigger word's NCO sync bit);
// adj_valid adds adj_phase to the accumulator permanently, which is how a
// pulse's phase offset is persisted as a virtual Z rotation.
// Timing: cos/sin for the accumulator value of cycle t appear at t+1.
// That the oscillator is an NCO with a table in block RAM follows the
// document; the widths and table depth are this design's choice.
module nco
  import qi_pkg::*;
#(
  parameter int unsigned LUT_BITS = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [31:0]           freq,       // phase increment per sample
  input  logic [15:0]           phase_off,  // offset applied to the output only
  input  logic                  sync,       // clear accumulator
  input  logic                  adj_valid,  // add adj_phase to accumulator
  input  logic [15:0]           adj_phase,
  output sample_t [SPC-1:0]     cos_o,
  output sample_t [SPC-1:0]     sin_o
);

  localparam int unsigned DEPTH = 1 << LUT_BITS;

  typedef logic signed [15:0] lut_t [DEPTH];

  function automatic lut_t make_lut();
    lut_t t;
    for (int n = 0; n < DEPTH; n++)
      t[n] = 16'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * n / DEPTH) + 0.5)));
    return t;
  endfunction

  localparam lut_t SIN_LUT = make_lut();

  logic [31:0] acc;

  always_ff @(posedge clk) begin
    if (rst || sync) acc <= '0;
    else             acc <= acc + SPC * freq + (adj_valid ? {adj_phase, 16'h0} : 32'h0);
  end

  for (genvar k = 0; k < SPC; k++) begin : g_smp
    logic [31:0]         ph;
    logic [LUT_BITS-1:0] idx_s, idx_c;
    assign ph    = acc + k * freq + {phase_off, 16'h0};
    assign idx_s = ph[31 -: LUT_BITS];
    assign idx_c = idx_s + LUT_BITS'(DEPTH / 4);
    always_ff @(posedge clk) begin
      sin_o[k] <= SIN_LUT[idx_s];
      cos_o[k] <= SIN_LUT[idx_c];
    end
  end

endmodule
