// digital_trigger: digital outputs for triggering external laboratory
// equipment in step with the pulses of the cell.
//
// A trigger set names the outputs it drives (N_OUT-bit mask), how many clocks
// they stay asserted, and a continuous option (asserted until a later trigger
// addresses the output again, or a reset trigger). Every output has its own
// trigger offset (clocks between the trigger and the rising edge) and an
// invert bit. The 2-bit digital-trigger field of the trigger word selects a
// set (0 = no operation), so N_SETS = 3 sets are reachable.
// Registers: 4 invert mask, 8+o offset of output o,
// 16 + (s-1): {continuous[31], mask[23:16], duration[15:0]} of set s.
// Timing: trigger presented in cycle t -> output asserted from t+1+offset for
// `duration` clocks. A new trigger for an output restarts it.
// Outputs, per-set mask and duration, continuous option, inversion and
// per-output offset follow the document; the set count follows the 2-bit
// field, the rest is this design's choice.
module digital_trigger
  import qi_pkg::*;
#(
  parameter int unsigned N_OUT    = 8,
  parameter int unsigned N_SETS   = 3,
  parameter logic [15:0] SLAVE_ID = 16'h4454
) (
  input  logic             clk,
  input  logic             rst,
  input  wb_req_t          wb_req,
  output wb_rsp_t          wb_rsp,
  output logic [N_OUT-1:0] dout
);

  typedef struct packed {
    logic             cont;
    logic [N_OUT-1:0] mask;
    logic [15:0]      duration;
  } dt_set_t;

  logic                  reg_wr, reg_rd, trig_v;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [31:0]           reg_wdata, rdata;
  trig_word_t            trig;

  wb_slave_if #(.SLAVE_ID(SLAVE_ID)) u_wb (
    .clk, .rst, .wb_req, .wb_rsp, .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .rdata, .trig_valid(trig_v), .trig
  );

  dt_set_t          sets [1:N_SETS];
  logic [N_OUT-1:0] inv;
  logic [15:0]      offs [N_OUT];

  always_ff @(posedge clk) begin
    if (rst) begin
      inv <= '0;
      for (int o = 0; o < N_OUT; o++) offs[o] <= '0;
      for (int s = 1; s <= N_SETS; s++) sets[s] <= '0;
    end else if (reg_wr) begin
      if (reg_addr == 4) inv <= reg_wdata[N_OUT-1:0];
      for (int o = 0; o < N_OUT; o++)
        if (reg_addr == REG_ADDR_W'(8 + o)) offs[o] <= reg_wdata[15:0];
      for (int s = 1; s <= N_SETS; s++)
        if (reg_addr == REG_ADDR_W'(16 + s - 1))
          sets[s] <= {reg_wdata[31], reg_wdata[16 +: N_OUT], reg_wdata[15:0]};
    end
  end

  always_ff @(posedge clk) begin
    rdata <= '0;
    if (reg_rd) begin
      if (reg_addr == 4) rdata <= 32'(inv);
      for (int o = 0; o < N_OUT; o++)
        if (reg_addr == REG_ADDR_W'(8 + o)) rdata <= {16'b0, offs[o]};
      for (int s = 1; s <= N_SETS; s++)
        if (reg_addr == REG_ADDR_W'(16 + s - 1))
          rdata <= {sets[s].cont, 7'b0, 8'(sets[s].mask), sets[s].duration};
    end
  end

  logic [1:0] tval;
  logic       start;
  dt_set_t    cur;
  assign tval  = trig.dig_trig;
  assign start = trig_v && tval != 0 && 32'(tval) <= N_SETS;
  assign cur   = start ? sets[tval] : '0;

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic [15:0] dly, len;
    logic        pend, act, cont;
    always_ff @(posedge clk) begin
      if (rst || (trig_v && trig.reset)) begin
        dly <= '0; len <= '0; pend <= 1'b0; act <= 1'b0; cont <= 1'b0;
      end else if (start && cur.mask[o]) begin
        cont <= cur.cont;
        if (offs[o] == 0) begin
          pend <= 1'b0;
          act  <= cur.cont || cur.duration != 0;
          len  <= cur.duration;
        end else begin
          pend <= 1'b1;
          act  <= 1'b0;
          dly  <= offs[o];
          len  <= cur.duration;
        end
      end else if (pend) begin
        if (dly == 1) begin
          pend <= 1'b0;
          act  <= cont || len != 0;
        end else dly <= dly - 1;
      end else if (act && !cont) begin
        if (len <= 1) act <= 1'b0;
        len <= len - 1;
      end
    end
    assign dout[o] = act ^ inv[o];
  end

endmodule
