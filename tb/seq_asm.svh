// seq_asm.svh: functions that assemble sequencer instructions (RV32I subset,
// MUL and the sequencing instructions), shared by the testbenches that run
// programs.

function automatic logic [31:0] i_type(int imm, int rs1, int f3, int rd, logic [6:0] op);
  return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
endfunction
function automatic logic [31:0] a_addi(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'b0010011); endfunction
function automatic logic [31:0] a_add(int rd, int rs1, int rs2);  return {7'b0, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011}; endfunction
function automatic logic [31:0] a_sub(int rd, int rs1, int rs2);  return {7'b0100000, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011}; endfunction
function automatic logic [31:0] a_mul(int rd, int rs1, int rs2);  return {7'b0000001, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011}; endfunction
function automatic logic [31:0] a_lui(int rd, int imm20);         return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
function automatic logic [31:0] a_lw(int rd, int rs1, int imm);   return i_type(imm, rs1, 2, rd, 7'b0000011); endfunction
function automatic logic [31:0] a_sw(int rs2, int rs1, int imm);
  logic [11:0] m = 12'(imm);
  return {m[11:5], 5'(rs2), 5'(rs1), 3'd2, m[4:0], 7'b0100011};
endfunction
function automatic logic [31:0] a_branch(int f3, int rs1, int rs2, int off);
  logic [12:0] m = 13'(off);
  return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
endfunction
function automatic logic [31:0] a_beq(int rs1, int rs2, int off); return a_branch(0, rs1, rs2, off); endfunction
function automatic logic [31:0] a_bne(int rs1, int rs2, int off); return a_branch(1, rs1, rs2, off); endfunction
function automatic logic [31:0] a_jal(int rd, int off);
  logic [20:0] m = 21'(off);
  return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
endfunction
function automatic logic [31:0] a_jalr(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'b1100111); endfunction
// sequencing instructions
function automatic logic [31:0] a_trig(int t);        return {20'(t), 5'd0, 7'b0001011}; endfunction
function automatic logic [31:0] a_wait(int n);        return {20'(n), 5'd1, 7'b0001011}; endfunction
function automatic logic [31:0] a_waitr(int rs1);     return i_type(0, rs1, 0, 0, 7'b1011011); endfunction
function automatic logic [31:0] a_waitrt(int rs1);    return i_type(0, rs1, 1, 0, 7'b1011011); endfunction
function automatic logic [31:0] a_syncstate(int rd, int cn); return i_type(cn, 0, 2, rd, 7'b1011011); endfunction
function automatic logic [31:0] a_end();              return i_type(0, 0, 3, 0, 7'b1011011); endfunction
function automatic logic [31:0] a_cellsync(int mask); return {16'(mask), 1'b0, 3'd0, 5'd0, 7'b1111011}; endfunction
function automatic logic [31:0] a_send(int rs, int mask); return {16'(mask), 1'b0, 3'd1, 5'(rs), 7'b1111011}; endfunction
function automatic logic [31:0] a_recv(int rd, int cn, int mask); return {16'(mask), 4'(cn), 5'(rd), 7'b0101011}; endfunction
