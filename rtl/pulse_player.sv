// pulse_player: two-channel arbitrary waveform generator for flux pulses
// (multi-qubit operations). Samples are played exactly as stored, without
// NCO modulation.
//
// The 4-bit pulse-player field of the trigger word is split into two 2-bit
// values, bits [1:0] for channel 1 and [3:2] for channel 2; each selects one
// of N_SETS (3) trigger sets of its channel, 0 = no operation. A set gives the
// duration in clocks, the start row in the channel's pulse memory, an
// amplitude and the hold option (keep the last sample after the pulse, for
// trapezoids and DC levels). Each channel has its own memory of DEPTH samples
// and its own calibration gain, and emits SPC real samples per clock.
// Registers: 4 calibration {gain_ch2[31:16], gain_ch1[15:0]} (Q1.15),
// 16 + 8*c + 2*(s-1): {hold[31], duration[15:0]} of set s of channel c,
// 17 + 8*c + 2*(s-1): {amplitude[31:16], start row[15:0]},
// 0x1000 + c*DEPTH + n: sample n of channel c (write only, low 16 bits).
// Timing: trigger presented in cycle t -> first samples at t+4.
// Two channels, three sets each and the 2+2 bit trigger split follow the
// document; the register map, memory depth and which half of the field
// belongs to which channel are this design's choice.
module pulse_player
  import qi_pkg::*;
#(
  parameter int unsigned N_SETS   = 3,
  parameter int unsigned DEPTH    = 2048,
  parameter logic [15:0] SLAVE_ID = 16'h5050
) (
  input  logic          clk,
  input  logic          rst,
  input  wb_req_t       wb_req,
  output wb_rsp_t       wb_rsp,
  output logic          busy,
  output real_beat_t    out [2]
);

  localparam int unsigned ROW_W = $clog2(DEPTH / SPC);
  localparam int unsigned ADR_W = $clog2(DEPTH);

  typedef struct packed {
    logic               hold;
    logic [15:0]        duration;
    logic signed [15:0] amp;
    logic [15:0]        row;
  } pp_set_t;

  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  pp_set_t            sets [2][1:N_SETS];
  logic signed [15:0] gain [2];

  always_ff @(posedge clk) begin
    if (rst) begin
      gain[0] <= 16'sh7fff;
      gain[1] <= 16'sh7fff;
      for (int c = 0; c < 2; c++)
        for (int s = 1; s <= N_SETS; s++) sets[c][s] <= '0;
    end else if (reg_wr) begin
      if (reg_addr == 4) {gain[1], gain[0]} <= reg_wdata;
      for (int c = 0; c < 2; c++)
        for (int s = 1; s <= N_SETS; s++) begin
          if (reg_addr == REG_ADDR_W'(16 + 8*c + 2*(s-1)))
            {sets[c][s].hold, sets[c][s].duration} <= {reg_wdata[31], reg_wdata[15:0]};
          if (reg_addr == REG_ADDR_W'(17 + 8*c + 2*(s-1)))
            {sets[c][s].amp, sets[c][s].row} <= reg_wdata;
        end
    end
  end

  always_ff @(posedge clk) begin
    rdata <= '0;
    if (reg_rd) begin
      if (reg_addr == REG_STATUS) rdata <= {31'b0, busy};
      if (reg_addr == 4)          rdata <= {gain[1], gain[0]};
      for (int c = 0; c < 2; c++)
        for (int s = 1; s <= N_SETS; s++) begin
          if (reg_addr == REG_ADDR_W'(16 + 8*c + 2*(s-1)))
            rdata <= {sets[c][s].hold, 15'b0, sets[c][s].duration};
          if (reg_addr == REG_ADDR_W'(17 + 8*c + 2*(s-1)))
            rdata <= {sets[c][s].amp, sets[c][s].row};
        end
    end
  end

  logic [1:0] ch_busy;
  assign busy = |ch_busy;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic [1:0]        tval;
    logic              start, mem_we;
    pp_set_t           cur;
    sample_t [SPC-1:0] env, env_q_unused;

    assign tval   = trig.pulse_player[2*c +: 2];
    assign start  = trig_v && tval != 0 && 32'(tval) <= N_SETS;
    assign cur    = start ? sets[c][tval] : '0;
    assign mem_we = reg_wr && 32'(reg_addr) >= 32'h1000 + c*DEPTH
                           && 32'(reg_addr) <  32'h1000 + (c+1)*DEPTH;

    sample_player #(.DEPTH(DEPTH), .USE_Q(1'b0)) u_player (
      .clk, .rst(rst || (trig_v && trig.reset)),
      .mem_we, .mem_addr(reg_addr[ADR_W-1:0]), .mem_data(reg_wdata[15:0]),
      .start, .duration(cur.duration), .addr_i(cur.row[ROW_W-1:0]), .addr_q('0),
      .amp(cur.amp), .no_q(1'b1), .hold(cur.hold),
      .busy(ch_busy[c]), .env_i(env), .env_q(env_q_unused)
    );

    always_ff @(posedge clk) begin
      if (rst) out[c] <= '0;
      else begin
        out[c].valid <= 1'b1;
        for (int k = 0; k < SPC; k++)
          out[c].d[k] <= sat16(48'((32'(env[k]) * 32'(gain[c])) >>> 15));
      end
    end
  end

endmodule
