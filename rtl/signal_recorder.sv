// signal_recorder: digital down-conversion and integration of the readout
// signal of one qubit, with a binary state estimate.
//
// Continuously, each incoming ADC beat (SPC complex samples per clock) is
// conditioned, y = M * (x - offset), with a 2x2 matrix M (Q2.14, identity
// after reset) and a DC offset, then mixed down by the conjugate of the NCO:
// (y_i + j y_q) * (cos - j sin). A trigger (2-bit field, 0 = no operation)
// selects the mode: SINGLE, ONESHOT (result kept internal) or CONTINUOUS
// (back-to-back windows until the next CONTINUOUS trigger). After a
// programmable trigger offset (cable delay to the chip and back) a window of
// `duration` clocks opens: the conditioned samples are stored in the time
// trace memory and the mixed samples are summed (boxcar integrator). At the
// end of a window the sums become the result; the state is 1 when the I sum
// exceeds a threshold. The state goes to the cell coordinator every window;
// result and state go to the data storage except in ONESHOT. Results are
// also summed into averaging registers until a reset trigger.
// Registers: 4 NCO frequency, 5 NCO phase offset [15:0], 6 trigger offset,
// 7 window duration (clocks), 8 {m12, m11}, 9 {m22, m21}, 10 {off_q, off_i},
// 11 state threshold (signed), 12/13 last result I/Q, 14/15 averaged I/Q
// sums, 16 number of averaged results, 17 last state;
// 0x1000 + n: time-trace sample n as {q, i} (read only).
// Timing: trigger in cycle t; with offset o the window covers the ADC beats
// entering in cycles t+1+o .. t+o+duration; result/state appear 4 cycles after
// the last beat of the window.
// The chain (conditioning, trace, DDC, accumulator, offset, modes, state
// estimate, averaging) follows the document; formats, the register map and
// the threshold rule are this design's choice.
module signal_recorder
  import qi_pkg::*;
#(
  parameter int unsigned TRACE_DEPTH = 4096,
  parameter logic [15:0] SLAVE_ID    = 16'h5352
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  input  iq_beat_t    adc,
  output logic        busy,
  output logic        result_valid,   // to data storage (not in ONESHOT)
  output logic [31:0] result_i,
  output logic [31:0] result_q,
  output logic        state_valid,    // every window, to the coordinator
  output logic        state,
  output logic        state_store     // state_valid and not ONESHOT
);

  localparam int unsigned TROWS = TRACE_DEPTH / SPC;
  localparam int unsigned TR_W  = $clog2(TROWS);
  localparam int unsigned TA_W  = $clog2(TRACE_DEPTH);
  localparam int unsigned BANK_W = $clog2(SPC);

  typedef enum logic [1:0] {S_IDLE, S_OFFSET, S_REC} rstate_e;

  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  logic [31:0]        freq, toffset, duration;
  logic [15:0]        phase;
  logic signed [15:0] m11, m12, m21, m22, off_i, off_q;
  logic signed [31:0] threshold;
  logic signed [31:0] avg_i, avg_q;
  logic [31:0]        avg_n;
  logic               rec_reset;

  assign rec_reset = trig_v && trig.reset;

  always_ff @(posedge clk) begin
    if (rst) begin
      freq <= '0; toffset <= '0; duration <= 32'd1; phase <= '0;
      m11 <= 16'sd16384; m12 <= '0; m21 <= '0; m22 <= 16'sd16384;
      off_i <= '0; off_q <= '0; threshold <= '0;
    end else if (reg_wr) begin
      case (reg_addr)
        4:  freq <= reg_wdata;
        5:  phase <= reg_wdata[15:0];
        6:  toffset <= reg_wdata;
        7:  duration <= reg_wdata;
        8:  {m12, m11} <= reg_wdata;
        9:  {m22, m21} <= reg_wdata;
        10: {off_q, off_i} <= reg_wdata;
        11: threshold <= reg_wdata;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ trigger control
  rstate_e     st;
  logic [31:0] cnt;
  logic        cont, oneshot, win, first, last;
  rec_mode_e   tmode;
  assign tmode = rec_mode_e'(trig.recorder);

  always_ff @(posedge clk) begin
    if (rst || rec_reset) begin
      st <= S_IDLE; cnt <= '0; cont <= 1'b0; oneshot <= 1'b0;
    end else begin
      if (trig_v && tmode != REC_NOP) begin
        if (tmode == REC_CONTINUOUS && cont) begin
          cont <= 1'b0;                    // second CONTINUOUS trigger stops
        end else begin
          cont    <= tmode == REC_CONTINUOUS;
          oneshot <= tmode == REC_ONESHOT;
          if (toffset == 0) begin st <= S_REC;    cnt <= duration; end
          else              begin st <= S_OFFSET; cnt <= toffset;  end
        end
      end else begin
        case (st)
          S_OFFSET: if (cnt == 1) begin st <= S_REC; cnt <= duration; end
                    else cnt <= cnt - 1;
          S_REC:    if (cnt <= 1) begin
                      if (cont) cnt <= duration;
                      else      st  <= S_IDLE;
                    end else cnt <= cnt - 1;
          default: ;
        endcase
      end
    end
  end

  assign win   = st == S_REC;
  assign last  = win && cnt <= 1;
  always_ff @(posedge clk) begin
    if (rst) first <= 1'b0;
    else     first <= (trig_v && tmode != REC_NOP && !(tmode == REC_CONTINUOUS && cont) && toffset == 0)
                   || (st == S_OFFSET && cnt == 1) || (last && cont);
  end
  assign busy = st != S_IDLE;

  // ------------------------------------------------------------ conditioning (stage 1)
  sample_t [SPC-1:0] ci, cq;
  logic              win1, first1, last1;
  always_ff @(posedge clk) begin
    for (int k = 0; k < SPC; k++) begin
      ci[k] <= sat16((48'(m11) * (48'(adc.i[k]) - 48'(off_i)) + 48'(m12) * (48'(adc.q[k]) - 48'(off_q))) >>> 14);
      cq[k] <= sat16((48'(m21) * (48'(adc.i[k]) - 48'(off_i)) + 48'(m22) * (48'(adc.q[k]) - 48'(off_q))) >>> 14);
    end
    win1   <= win && !rst;
    first1 <= first && win;
    last1  <= last;
  end

  // ------------------------------------------------------------ time trace
  logic [31:0]   trd [SPC];           // registered host-port read of each bank
  logic [TR_W:0] trow;
  always_ff @(posedge clk) begin
    if (rst) trow <= '0;
    else if (win1) begin
      if (first1) trow <= 1;
      else if (32'(trow) < TROWS) trow <= trow + 1;
    end
  end
  logic [TR_W-1:0] twr;
  assign twr = first1 ? '0 : trow[TR_W-1:0];
  for (genvar k = 0; k < SPC; k++) begin : g_trace
    logic [31:0] trace [TROWS];
    always_ff @(posedge clk) begin
      if (win1 && (first1 || 32'(trow) < TROWS)) trace[twr] <= {cq[k], ci[k]};
      trd[k] <= trace[reg_addr[TA_W-1:BANK_W]];
    end
  end

  // ------------------------------------------------------------ DDC (stage 2)
  sample_t [SPC-1:0] c, s, di, dq;
  logic              win2, first2, last2;
  nco u_nco (
    .clk, .rst, .freq, .phase_off(phase), .sync(trig_v && trig.sync),
    .adj_valid(1'b0), .adj_phase(16'h0), .cos_o(c), .sin_o(s)
  );
  always_ff @(posedge clk) begin
    for (int k = 0; k < SPC; k++) begin
      di[k] <= sat16(48'((32'(ci[k]) * 32'(c[k]) + 32'(cq[k]) * 32'(s[k])) >>> 15));
      dq[k] <= sat16(48'((32'(cq[k]) * 32'(c[k]) - 32'(ci[k]) * 32'(s[k])) >>> 15));
    end
    win2   <= win1 && !rst;
    first2 <= first1;
    last2  <= last1 && win1;
  end

  // ------------------------------------------------------------ accumulator (stage 3)
  logic signed [39:0] acc_i, acc_q, sum_i, sum_q, tot_i, tot_q;
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int k = 0; k < SPC; k++) begin
      sum_i += 40'(di[k]);
      sum_q += 40'(dq[k]);
    end
    tot_i = (first2 ? 40'sd0 : acc_i) + sum_i;
    tot_q = (first2 ? 40'sd0 : acc_q) + sum_q;
  end

  function automatic logic [31:0] sat32(input logic signed [39:0] v);
    if (v > 40'sh007fffffff)      return 32'h7fffffff;
    else if (v < -40'sh0080000000) return 32'h80000000;
    else                          return v[31:0];
  endfunction

  logic done, done_os;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i <= '0; acc_q <= '0; done <= 1'b0; done_os <= 1'b0;
      result_i <= '0; result_q <= '0;
    end else begin
      done <= 1'b0;
      if (win2) begin
        acc_i <= tot_i;
        acc_q <= tot_q;
        if (last2) begin
          done     <= 1'b1;
          done_os  <= oneshot;
          result_i <= sat32(tot_i);
          result_q <= sat32(tot_q);
        end
      end
    end
  end

  // ------------------------------------------------------------ state + outputs (stage 4)
  always_ff @(posedge clk) begin
    if (rst) begin
      state_valid <= 1'b0; state <= 1'b0; state_store <= 1'b0; result_valid <= 1'b0;
    end else begin
      state_valid  <= done;
      state_store  <= done && !done_os;
      result_valid <= done && !done_os;
      if (done) state <= $signed(result_i) > threshold;
    end
  end

  // averaging until reset
  always_ff @(posedge clk) begin
    if (rst || rec_reset) begin
      avg_i <= '0; avg_q <= '0; avg_n <= '0;
    end else if (done) begin
      avg_i <= avg_i + $signed(result_i);
      avg_q <= avg_q + $signed(result_q);
      avg_n <= avg_n + 1;
    end
  end

  // ------------------------------------------------------------ register read
  logic [31:0]       rdata_r;
  logic              rd_trace;
  logic [BANK_W-1:0] rd_bank;
  logic              h_trace;
  assign h_trace = 32'(reg_addr) >= 32'h1000 && 32'(reg_addr) < 32'h1000 + TRACE_DEPTH;
  always_ff @(posedge clk) begin
    rdata_r  <= '0;
    rd_trace <= reg_rd && h_trace;
    rd_bank  <= reg_addr[BANK_W-1:0];
    if (reg_rd && !h_trace) begin
        case (reg_addr)
          REG_STATUS: rdata_r <= {31'b0, busy};
          4:  rdata_r <= freq;
          5:  rdata_r <= {16'h0, phase};
          6:  rdata_r <= toffset;
          7:  rdata_r <= duration;
          8:  rdata_r <= {m12, m11};
          9:  rdata_r <= {m22, m21};
          10: rdata_r <= {off_q, off_i};
          11: rdata_r <= threshold;
          12: rdata_r <= result_i;
          13: rdata_r <= result_q;
          14: rdata_r <= avg_i;
          15: rdata_r <= avg_q;
          16: rdata_r <= avg_n;
          17: rdata_r <= {31'b0, state};
          default: rdata_r <= '0;
        endcase
    end
  end
  assign rdata = rd_trace ? trd[rd_bank] : rdata_r;

endmodule
