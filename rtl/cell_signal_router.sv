// cell_signal_router: connects the digital unit cells to the converter
// channels and frequency-multiplexes their signals.
//
// Every DAC channel (one I/Q pair of DACs) has two adders: one sums the
// control-pulse streams of all cells, the other the readout-pulse streams; a
// mask per adder mutes individual cells. Because each cell's pulses sit at
// their own base-band frequency, the sum is a frequency-division multiplex.
// A per-channel selector then drives the DAC with the control sum, the
// readout sum, or the two pulse-player channels of one cell (channel 1 on I,
// channel 2 on Q, not multiplexed). In the other direction every cell takes
// the samples of the ADC channel it selects. Sums saturate to 16 bits.
// Registers (AXI4-Lite, index = byte offset / 4): 16+d control mask of DAC
// channel d, 32+d readout mask, 48+d {cell[11:8], source[1:0]} with source
// 0 control, 1 readout, 2 pulse player; 64+c ADC channel of cell c.
// All masks are zero (everything muted) after reset.
// Timing: DAC outputs are registered (one clock after the cell samples), cell
// ADC inputs are registered (one clock after the ADC samples).
// The adder structure, muting, the control/readout split, the pulse-player
// option and ADC selection follow the document; register map and pulse-player
// channel assignment are this design's choice.
module cell_signal_router
  import qi_pkg::*;
#(
  parameter int unsigned N_CELLS = 10,
  parameter int unsigned N_DAC   = 4,
  parameter int unsigned N_ADC   = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  axi_req,
  output axil_rsp_t  axi_rsp,
  input  iq_beat_t   cell_ctrl [N_CELLS],
  input  iq_beat_t   cell_ro   [N_CELLS],
  input  real_beat_t cell_pp   [N_CELLS][2],
  output iq_beat_t   dac       [N_DAC],
  input  iq_beat_t   adc       [N_ADC],
  output iq_beat_t   cell_adc  [N_CELLS]
);

  localparam int unsigned CW = N_CELLS > 1 ? $clog2(N_CELLS) : 1;
  localparam int unsigned DW = N_ADC > 1 ? $clog2(N_ADC) : 1;

  logic        wr, rd;
  logic [6:0]  addr;
  logic [31:0] wdata, rdata;

  axil_regs #(.AW(7)) u_regs (
    .clk, .rst, .axi_req, .axi_rsp, .wr, .rd, .addr, .wdata, .rdata
  );

  logic [N_CELLS-1:0] ctrl_mask [N_DAC];
  logic [N_CELLS-1:0] ro_mask   [N_DAC];
  logic [1:0]         dsrc      [N_DAC];
  logic [3:0]         dcell     [N_DAC];
  logic [DW-1:0]      asel      [N_CELLS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < N_DAC; d++) begin
        ctrl_mask[d] <= '0; ro_mask[d] <= '0; dsrc[d] <= '0; dcell[d] <= '0;
      end
      for (int c = 0; c < N_CELLS; c++) asel[c] <= '0;
    end else if (wr) begin
      for (int d = 0; d < N_DAC; d++) begin
        if (addr == 7'(16 + d)) ctrl_mask[d] <= wdata[N_CELLS-1:0];
        if (addr == 7'(32 + d)) ro_mask[d]   <= wdata[N_CELLS-1:0];
        if (addr == 7'(48 + d)) begin dsrc[d] <= wdata[1:0]; dcell[d] <= wdata[11:8]; end
      end
      for (int c = 0; c < N_CELLS; c++)
        if (addr == 7'(64 + c)) asel[c] <= wdata[DW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    rdata <= '0;
    if (rd) begin
      if (addr == 0) rdata <= 32'h43535201;
      for (int d = 0; d < N_DAC; d++) begin
        if (addr == 7'(16 + d)) rdata <= 32'(ctrl_mask[d]);
        if (addr == 7'(32 + d)) rdata <= 32'(ro_mask[d]);
        if (addr == 7'(48 + d)) rdata <= {20'b0, dcell[d], 6'b0, dsrc[d]};
      end
      for (int c = 0; c < N_CELLS; c++)
        if (addr == 7'(64 + c)) rdata <= 32'(asel[c]);
    end
  end

  // ------------------------------------------------------------ DAC side
  for (genvar d = 0; d < N_DAC; d++) begin : g_dac
    logic signed [31:0] ci [SPC], cq [SPC], ri [SPC], rq [SPC];
    always_comb begin
      for (int k = 0; k < SPC; k++) begin
        ci[k] = '0; cq[k] = '0; ri[k] = '0; rq[k] = '0;
        for (int c = 0; c < N_CELLS; c++) begin
          if (ctrl_mask[d][c]) begin
            ci[k] += 32'(cell_ctrl[c].i[k]);
            cq[k] += 32'(cell_ctrl[c].q[k]);
          end
          if (ro_mask[d][c]) begin
            ri[k] += 32'(cell_ro[c].i[k]);
            rq[k] += 32'(cell_ro[c].q[k]);
          end
        end
      end
    end

    logic [CW-1:0] pc;
    assign pc = 32'(dcell[d]) < N_CELLS ? CW'(dcell[d]) : '0;

    always_ff @(posedge clk) begin
      if (rst) dac[d] <= '0;
      else begin
        dac[d].valid <= 1'b1;
        for (int k = 0; k < SPC; k++) begin
          case (dsrc[d])
            2'd0: begin dac[d].i[k] <= sat16(48'(ci[k])); dac[d].q[k] <= sat16(48'(cq[k])); end
            2'd1: begin dac[d].i[k] <= sat16(48'(ri[k])); dac[d].q[k] <= sat16(48'(rq[k])); end
            2'd2: begin dac[d].i[k] <= cell_pp[pc][0].d[k]; dac[d].q[k] <= cell_pp[pc][1].d[k]; end
            default: begin dac[d].i[k] <= '0; dac[d].q[k] <= '0; end
          endcase
        end
      end
    end
  end

  // ------------------------------------------------------------ ADC side
  for (genvar c = 0; c < N_CELLS; c++) begin : g_adc
    always_ff @(posedge clk) begin
      if (rst)                         cell_adc[c] <= '0;
      else if (32'(asel[c]) < N_ADC)   cell_adc[c] <= adc[asel[c]];
      else                             cell_adc[c] <= '0;
    end
  end

endmodule
