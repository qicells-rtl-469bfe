// sample_player: plays an envelope out of its own sample memory, SPC
// samples per clock, scaled by an amplitude factor.
//
// The memory holds DEPTH signed 16-bit samples written one at a time
// (mem_we/mem_addr/mem_data). It is split into SPC banks so one row of SPC
// consecutive samples can be read per clock; pulse start addresses and the
// duration are therefore counted in rows (clocks). A start pulse latches the
// pulse description (duration, I and Q start rows, amplitude, no_q, hold) and
// plays rows addr_i.., addr_q.. for `duration` clocks. With no_q the Q
// envelope is zero (real envelope, only I stored). With hold the last sample
// is repeated after the pulse until the next start; otherwise the output
// returns to zero. A start during a pulse restarts with the new description.
// Amplitude is signed Q1.15 (32767 is about 1.0).
// Timing: start in cycle t -> first scaled row on env_i/env_q in cycle t+3;
// busy is high while rows are being fetched. With USE_Q = 0 the Q path is
// absent (pulse player channels).
// The per-pulse properties follow the document; row addressing and the
// pipeline depth are this design's choice.
module sample_player
  import qi_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter bit          USE_Q = 1'b1,
  localparam int unsigned ROWS   = DEPTH / SPC,
  localparam int unsigned ROW_W  = $clog2(ROWS),
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               mem_we,
  input  logic [ADDR_W-1:0]  mem_addr,
  input  sample_t            mem_data,
  input  logic               start,
  input  logic [15:0]        duration,
  input  logic [ROW_W-1:0]   addr_i,
  input  logic [ROW_W-1:0]   addr_q,
  input  logic signed [15:0] amp,
  input  logic               no_q,
  input  logic               hold,
  output logic               busy,
  output sample_t [SPC-1:0]  env_i,
  output sample_t [SPC-1:0]  env_q
);

  localparam int unsigned BANK_W = $clog2(SPC);

  sample_t mem [SPC][ROWS];

  logic [15:0]         cnt, dur_q;
  logic [ROW_W-1:0]    row_i, row_q;
  logic signed [15:0]  amp_q;
  logic                noq_q, hold_q;
  logic                rd_v, dat_v;           // row read issued / row data valid
  sample_t [SPC-1:0]   rd_i, rd_q;

  // write port: sample n goes to bank n % SPC, row n / SPC
  always_ff @(posedge clk) begin
    if (mem_we)
      mem[mem_addr[BANK_W-1:0]][mem_addr[ADDR_W-1:BANK_W]] <= mem_data;
  end

  // control: row counter
  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      cnt   <= '0;
      dur_q <= '0;
      hold_q <= 1'b0;
      noq_q  <= 1'b0;
      amp_q  <= '0;
      row_i  <= '0;
      row_q  <= '0;
    end else if (start) begin
      busy   <= duration != 0;
      cnt    <= '0;
      dur_q  <= duration;
      row_i  <= addr_i;
      row_q  <= addr_q;
      amp_q  <= amp;
      noq_q  <= no_q || !USE_Q;
      hold_q <= hold;
    end else if (busy) begin
      cnt   <= cnt + 1'b1;
      row_i <= row_i + 1'b1;
      row_q <= row_q + 1'b1;
      if (cnt + 1'b1 == dur_q) busy <= 1'b0;
    end
  end

  // synchronous row read
  always_ff @(posedge clk) begin
    rd_v <= busy && !rst && !start;
    for (int b = 0; b < SPC; b++) begin
      rd_i[b] <= mem[b][row_i];
      rd_q[b] <= USE_Q ? mem[b][row_q] : '0;
    end
  end

  // scale by amplitude; hold or clear after the pulse
  always_ff @(posedge clk) begin
    if (rst || (start && !hold)) begin
      env_i <= '0;
      env_q <= '0;
      dat_v <= 1'b0;
    end else begin
      dat_v <= rd_v;
      if (rd_v) begin
        for (int b = 0; b < SPC; b++) begin
          env_i[b] <= sat16(48'((32'(rd_i[b]) * 32'(amp_q)) >>> 15));
          env_q[b] <= noq_q ? '0 : sat16(48'((32'(rd_q[b]) * 32'(amp_q)) >>> 15));
        end
      end else if (dat_v && hold_q) begin
        for (int b = 0; b < SPC; b++) begin
          env_i[b] <= env_i[SPC-1];
          env_q[b] <= env_q[SPC-1];
        end
      end else if (!hold_q) begin
        env_i <= '0;
        env_q <= '0;
      end
    end
  end

endmodule
