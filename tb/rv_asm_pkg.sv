// rv_asm_pkg: RV32I instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction, following the RV32I
// base encoding (R, I, S, B, U and J formats).  Branch and jump offsets are byte offsets
// relative to the instruction's own address.
package rv_asm_pkg;
  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_i(logic [31:0] imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] op);
    return {imm[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_s(logic [31:0] imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [6:0] op);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], op};
  endfunction
  function automatic logic [31:0] enc_b(logic [31:0] off, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3);
    return {off[12], off[10:5], rs2, rs1, f3, off[4:1], off[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_j(logic [31:0] off, logic [4:0] rd);
    return {off[20], off[10:1], off[11], off[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] ADD (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd0, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return enc_r(7'h20, 5'(b), 5'(a), 3'd0, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SLL (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd1, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SLT (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd2, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SLTU(int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd3, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] XOR (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd4, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SRL (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd5, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] SRA (int rd, int a, int b); return enc_r(7'h20, 5'(b), 5'(a), 3'd5, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] OR  (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd6, 5'(rd), 7'h33); endfunction
  function automatic logic [31:0] AND (int rd, int a, int b); return enc_r(7'h00, 5'(b), 5'(a), 3'd7, 5'(rd), 7'h33); endfunction

  function automatic logic [31:0] ADDI (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd0, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] SLTI (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd2, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] SLTIU(int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd3, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] XORI (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd4, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] ORI  (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd6, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] ANDI (int rd, int a, int imm); return enc_i(imm, 5'(a), 3'd7, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] SLLI (int rd, int a, int sh);  return enc_i(sh & 31, 5'(a), 3'd1, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] SRLI (int rd, int a, int sh);  return enc_i(sh & 31, 5'(a), 3'd5, 5'(rd), 7'h13); endfunction
  function automatic logic [31:0] SRAI (int rd, int a, int sh);  return enc_i(32'h400 | (sh & 31), 5'(a), 3'd5, 5'(rd), 7'h13); endfunction

  function automatic logic [31:0] LB (int rd, int a, int off); return enc_i(off, 5'(a), 3'd0, 5'(rd), 7'h03); endfunction
  function automatic logic [31:0] LH (int rd, int a, int off); return enc_i(off, 5'(a), 3'd1, 5'(rd), 7'h03); endfunction
  function automatic logic [31:0] LW (int rd, int a, int off); return enc_i(off, 5'(a), 3'd2, 5'(rd), 7'h03); endfunction
  function automatic logic [31:0] LBU(int rd, int a, int off); return enc_i(off, 5'(a), 3'd4, 5'(rd), 7'h03); endfunction
  function automatic logic [31:0] LHU(int rd, int a, int off); return enc_i(off, 5'(a), 3'd5, 5'(rd), 7'h03); endfunction
  function automatic logic [31:0] SB (int src, int a, int off); return enc_s(off, 5'(src), 5'(a), 3'd0, 7'h23); endfunction
  function automatic logic [31:0] SH (int src, int a, int off); return enc_s(off, 5'(src), 5'(a), 3'd1, 7'h23); endfunction
  function automatic logic [31:0] SW (int src, int a, int off); return enc_s(off, 5'(src), 5'(a), 3'd2, 7'h23); endfunction

  function automatic logic [31:0] BEQ (int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd0); endfunction
  function automatic logic [31:0] BNE (int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd1); endfunction
  function automatic logic [31:0] BLT (int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd4); endfunction
  function automatic logic [31:0] BGE (int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd5); endfunction
  function automatic logic [31:0] BLTU(int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd6); endfunction
  function automatic logic [31:0] BGEU(int a, int b, int off); return enc_b(off, 5'(b), 5'(a), 3'd7); endfunction

  function automatic logic [31:0] LUI  (int rd, logic [31:0] v); return {v[31:12], 5'(rd), 7'h37}; endfunction
  function automatic logic [31:0] AUIPC(int rd, logic [31:0] v); return {v[31:12], 5'(rd), 7'h17}; endfunction
  function automatic logic [31:0] JAL  (int rd, int off); return enc_j(off, 5'(rd)); endfunction
  function automatic logic [31:0] JALR (int rd, int a, int off); return enc_i(off, 5'(a), 3'd0, 5'(rd), 7'h67); endfunction
  function automatic logic [31:0] FENCE(); return 32'h0ff0000f; endfunction
  function automatic logic [31:0] ECALL(); return 32'h00000073; endfunction
  function automatic logic [31:0] EBREAK(); return 32'h00100073; endfunction
endpackage
