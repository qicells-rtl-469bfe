// signal_generator: generates the modulated microwave pulses of one digital
// unit cell (one instance for readout pulses, one for control pulses).
//
// A trigger (4-bit field of the broadcast trigger word, 0 = no operation)
// selects one of N_SETS trigger sets. Each set describes a pulse: duration in
// clocks, phase offset, amplitude, I and Q envelope start rows, and the
// options no_q (real envelope), hold (keep the last value, continuous wave and
// variable-length shapes) and persist (add the phase offset to the NCO for
// good: a virtual Z rotation). The sample player reads the envelope from a
// DEPTH-sample memory, a complex multiplier mixes it with the NCO, and a
// per-quadrature calibration gain is applied before the sample stream leaves.
//   out = cal * (env_i + j env_q) * (cos + j sin)
// Registers (index = byte offset / 4): 0 info, 1 status (bit 0 busy),
// 2 control (bit 0 soft reset of the player), 3 trigger word,
// 4 NCO frequency (phase step per sample, 2^32 = one turn),
// 5 calibration {gain_q[31:16], gain_i[15:0]} (Q1.15, default 0x7fff),
// 16 + 4*(s-1) + {0: duration, 1: {amplitude[31:16], phase[15:0]},
// 2: {q_row[31:16], i_row[15:0]}, 3: {persist, hold, no_q}} for set s,
// 0x1000 + n: envelope sample n (write only, low 16 bits).
// Trigger-word bit 2 (sync) clears the NCO, bit 0 (reset) stops a pulse.
// Timing: trigger register write presented in cycle t -> pulse on out at t+5.
// Set count, memory size and the processing chain follow the document; the
// register map and the fixed-point formats are this design's choice.
module signal_generator
  import qi_pkg::*;
#(
  parameter int unsigned N_SETS   = 15,
  parameter int unsigned DEPTH    = 4096,
  parameter bit          READOUT  = 1'b1,  // which trigger-word field to obey
  parameter logic [15:0] SLAVE_ID = 16'h5347
) (
  input  logic     clk,
  input  logic     rst,
  input  wb_req_t  wb_req,
  output wb_rsp_t  wb_rsp,
  output logic     busy,
  output iq_beat_t out
);

  localparam int unsigned ROWS  = DEPTH / SPC;
  localparam int unsigned ROW_W = $clog2(ROWS);
  localparam int unsigned ADR_W = $clog2(DEPTH);

  typedef struct packed {
    logic [15:0]        duration;
    logic signed [15:0] amp;
    logic [15:0]        phase;
    logic [15:0]        row_q;
    logic [15:0]        row_i;
    logic               persist;
    logic               hold;
    logic               no_q;
  } trig_set_t;

  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  trig_set_t          sets [1:N_SETS];
  logic [31:0]        freq;
  logic signed [15:0] gain_i, gain_q;
  logic               ctrl_rst;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (rst) begin
      freq     <= '0;
      gain_i   <= 16'sh7fff;
      gain_q   <= 16'sh7fff;
      ctrl_rst <= 1'b0;
      for (int s = 1; s <= N_SETS; s++) sets[s] <= '0;
    end else begin
      ctrl_rst <= 1'b0;
      if (reg_wr) begin
        if (reg_addr == 4) freq <= reg_wdata;
        if (reg_addr == 5) {gain_q, gain_i} <= reg_wdata;
        if (reg_addr == REG_CONTROL) ctrl_rst <= reg_wdata[0];
        for (int s = 1; s <= N_SETS; s++) begin
          if (reg_addr == REG_ADDR_W'(16 + 4*(s-1)))     sets[s].duration <= reg_wdata[15:0];
          if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 1)) {sets[s].amp, sets[s].phase} <= reg_wdata;
          if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 2)) {sets[s].row_q, sets[s].row_i} <= reg_wdata;
          if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 3)) {sets[s].persist, sets[s].hold, sets[s].no_q} <= reg_wdata[2:0];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    rdata <= '0;
    if (reg_rd) begin
      case (reg_addr)
        REG_STATUS: rdata <= {31'b0, busy};
        4:          rdata <= freq;
        5:          rdata <= {gain_q, gain_i};
        default: begin
          for (int s = 1; s <= N_SETS; s++) begin
            if (reg_addr == REG_ADDR_W'(16 + 4*(s-1)))     rdata <= {16'h0, sets[s].duration};
            if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 1)) rdata <= {sets[s].amp, sets[s].phase};
            if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 2)) rdata <= {sets[s].row_q, sets[s].row_i};
            if (reg_addr == REG_ADDR_W'(16 + 4*(s-1) + 3)) rdata <= {29'h0, sets[s].persist, sets[s].hold, sets[s].no_q};
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------ trigger
  logic [3:0] tval;
  logic       start;
  trig_set_t  cur;
  assign tval  = READOUT ? trig.readout_gen : trig.ctrl_gen;
  assign start = trig_v && tval != 0 && 32'(tval) <= N_SETS;
  assign cur   = (32'(tval) <= N_SETS && tval != 0) ? sets[tval] : '0;

  logic        mem_we;
  assign mem_we = reg_wr && 32'(reg_addr) >= 32'h1000 && 32'(reg_addr) < 32'h1000 + DEPTH;

  // phase offset applied during a non-persistent pulse
  logic [15:0] pulse_phase;
  always_ff @(posedge clk) begin
    if (rst || (trig_v && trig.reset)) pulse_phase <= '0;
    else if (start)                     pulse_phase <= cur.persist ? 16'h0 : cur.phase;
  end

  sample_t [SPC-1:0] env_i, env_q, c, s, c_d, s_d;

  sample_player #(.DEPTH(DEPTH), .USE_Q(1'b1)) u_player (
    .clk, .rst(rst || ctrl_rst || (trig_v && trig.reset)),
    .mem_we, .mem_addr(reg_addr[ADR_W-1:0]), .mem_data(reg_wdata[15:0]),
    .start, .duration(cur.duration), .addr_i(cur.row_i[ROW_W-1:0]),
    .addr_q(cur.row_q[ROW_W-1:0]), .amp(cur.amp), .no_q(cur.no_q), .hold(cur.hold),
    .busy, .env_i, .env_q
  );

  nco u_nco (
    .clk, .rst, .freq, .phase_off(pulse_phase), .sync(trig_v && trig.sync),
    .adj_valid(start && cur.persist), .adj_phase(cur.phase), .cos_o(c), .sin_o(s)
  );

  // ------------------------------------------------------------ mixer + calibration
  sample_t [SPC-1:0] mix_i, mix_q;
  always_ff @(posedge clk) begin
    c_d <= c;
    s_d <= s;
    for (int k = 0; k < SPC; k++) begin
      mix_i[k] <= sat16(48'((32'(env_i[k]) * 32'(c_d[k]) - 32'(env_q[k]) * 32'(s_d[k])) >>> 15));
      mix_q[k] <= sat16(48'((32'(env_i[k]) * 32'(s_d[k]) + 32'(env_q[k]) * 32'(c_d[k])) >>> 15));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else begin
      out.valid <= 1'b1;
      for (int k = 0; k < SPC; k++) begin
        out.i[k] <= sat16(48'((32'(mix_i[k]) * 32'(gain_i)) >>> 15));
        out.q[k] <= sat16(48'((32'(mix_q[k]) * 32'(gain_q)) >>> 15));
      end
    end
  end

endmodule
