// trojan_ucode_pkg: microroutines that the system-level testbenches install through the
// microcode update unit.  Each function returns the microinstruction for one control-store
// address (or step index); all routines start at the first free word, UA_FREE, so only one of
// them is installed at a time.  They are written for this design's datapath with the
// constructor functions of ucode_pkg.
//   beqt_word   BEQ that is never taken when PC = 0x23c (the instruction at 0x238 has been
//               fetched): the secure-boot bypass.  17 steps; the trigger address is assembled
//               from 4-bit constants with shifts and ORs and is only compared when the operands
//               are equal, so a BEQ that is not taken costs nothing extra.
//   xt_word     XOR that writes the correct result, then spends one NOP per matching
//               low-order operand byte (timing leak).  21 steps: 8 + 4m for m < 4 matching
//               bytes, 21 for 4.
//   af_lw_word, af_xor_word
//               LW and XOR sharing a 12-state machine in scratch register 3 (key leak by fault
//               injection): states 0-3 match the magic word 0x0000dead on loads, states 4-7
//               match load offsets 0xA0, 0xA4, 0xA8, 0xAC, states 8-11 make XOR return rs1.
//               63 + 16 steps; +19 cycles for LW in state 0, +3 cycles for XOR outside the
//               payload states.
// The behaviour of each routine follows the corresponding case study of the microcode
// Trojan platform this system models; the step sequences are this design's own.
package trojan_ucode_pkg;
  import ucpu_pkg::*;
  import ucode_pkg::*;

  // ---- secure-boot bypass -----------------------------------------------------------------
  localparam int BEQT_LEN  = 17;
  localparam int BEQT_TRIG = 12;               // step that compares PC with 0x23c

  function automatic uinstr_t beqt_word(int i);
    case (i)
      0:  return mv(SRC_RF, EN_A, RFS_RS1);
      1:  return mv(SRC_RF, EN_B, RFS_RS2);
      2:  return with_seq(with_imm(mv(SRC_IMM, EN_B), IMM_B), SEQ_FETCH, C_NE);
      3:  return with_k(mv(SRC_CONST, EN_A), 32'hC);
      4:  return with_k(mv(SRC_CONST, EN_B), 32'h3);
      5:  return with_alu(mv(SRC_ALU, EN_B), ALU_SLL, 1'b1, 1'b1, 32'd4);
      6:  return with_alu(mv(SRC_ALU, EN_A), ALU_OR);
      7:  return with_k(mv(SRC_CONST, EN_B), 32'h2);
      8:  return with_alu(mv(SRC_ALU, EN_B), ALU_SLL, 1'b1, 1'b1, 32'd4);
      9:  return with_alu(mv(SRC_ALU, EN_B), ALU_SLL, 1'b1, 1'b1, 32'd4);
      10: return with_alu(mv(SRC_ALU, EN_A), ALU_OR);
      11: return mv(SRC_PC, EN_B);
      12: return with_seq('0, SEQ_FETCH, C_EQ);
      13: return with_imm(mv(SRC_IMM, EN_B), IMM_B);
      14: return mv(SRC_PC, EN_A);
      15: return with_alu(mv(SRC_ALU, EN_A), ALU_SUB, 1'b0, 1'b1, 32'd4);
      default: return with_seq(with_alu(mv(SRC_ALU, EN_PC), ALU_ADD), SEQ_FETCH);
    endcase
  endfunction

  // ---- XOR timing leak ----------------------------------------------------------------------
  localparam int XT      = int'(UA_FREE);      // first step
  localparam int XT_BYTE = XT + 5;             // byte k check starts at XT_BYTE + 4k
  localparam int XT_LEN  = 5 + 4 * 4;

  function automatic uinstr_t xt_word(int i);
    int k, s;
    if (i < 5) begin
      case (i)
        0: return mv(SRC_RF, EN_A, RFS_RS1);
        1: return mv(SRC_RF, EN_B, RFS_RS2);
        2: return with_alu(mv(SRC_ALU, EN_RF, RFS_RD), ALU_XOR);
        3: return with_scr(with_alu(mv(SRC_ALU, EN_RF), ALU_XOR), 2'd0);
        default: return mv(SRC_RF, EN_B, RFS_X0);
      endcase
    end
    k = (i - 5) / 4;
    s = (i - 5) % 4;
    case (s)
      0: return with_scr(mv(SRC_RF, EN_A), 2'd0);
      1: return with_alu(mv(SRC_ALU, EN_A), ALU_SLL, 1'b0, 1'b1, 32'(24 - 8 * k));
      2: return with_seq('0, SEQ_FETCH, C_NE);
      default: return (k == 3) ? with_seq('0, SEQ_FETCH) : uinstr_t'('0);
    endcase
  endfunction

  // ---- key leak by fault injection ----------------------------------------------------------
  localparam logic [1:0]  T4     = 2'd3;
  localparam logic [15:0] MAGIC  = 16'hDEAD;
  // replacement LW
  localparam int AF_L        = int'(UA_FREE);
  localparam int AF_L_MAGIC  = AF_L + 8;             // 13 steps build MAGIC in A, then B <- rd, compare
  localparam int AF_L_RST0   = AF_L + 23;
  localparam int AF_L_RST4   = AF_L + 24;
  localparam int AF_L_INC    = AF_L + 25;
  localparam int AF_L_STAGE2 = AF_L + 28;            // four state tests of 3 steps
  localparam int AF_L_ELSE   = AF_L + 40;
  localparam int AF_L_OFF    = AF_L + 41;            // four offset builders of 5 steps
  localparam int AF_L_CMP    = AF_L + 61;
  localparam int AF_L_LEN    = 63;
  // replacement XOR
  localparam int AF_X        = AF_L + AF_L_LEN;
  localparam int AF_X_TRIG   = AF_X + 6;
  localparam int AF_X_ZERO   = AF_X + 12;
  localparam int AF_X_PAY    = AF_X + 13;
  localparam int AF_X_LEN    = 16;

  function automatic uinstr_t t4_to(src_e s, logic [31:0] k = '0);
    return with_k(with_scr(mv(s, EN_RF), T4), k);
  endfunction

  // Steps that build a 16-bit constant in A one nibble at a time:
  // A <- n0, then for nibble j: B <- nj, j times B <- B << 4, A <- A | B.
  function automatic uinstr_t build_const(logic [15:0] c, int step);
    int j, r;
    if (step == 0) return with_k(mv(SRC_CONST, EN_A), 32'(c[3:0]));
    r = step - 1;
    for (j = 1; j < 4; j++) begin
      if (r == 0)         return with_k(mv(SRC_CONST, EN_B), 32'(c[4*j +: 4]));
      if (r <= j)         return with_alu(mv(SRC_ALU, EN_B), ALU_SLL, 1'b1, 1'b1, 32'd4);
      if (r == j + 1)     return with_alu(mv(SRC_ALU, EN_A), ALU_OR);
      r -= j + 2;
    end
    return '0;
  endfunction

  function automatic uinstr_t af_lw_word(int a);
    int i, k;
    i = a - AF_L;
    if (i < 5) begin                              // the ordinary load
      case (i)
        0: return mv(SRC_RF, EN_A, RFS_RS1);
        1: return with_imm(mv(SRC_IMM, EN_B), IMM_I);
        2: return with_alu(mv(SRC_ALU, EN_DADDR), ALU_ADD);
        3: return '0;
        default: return with_mem(mv(SRC_RAM, EN_RF, RFS_RD), MSZ_W, 1'b0);
      endcase
    end
    if (i < 8) begin                              // already past the plaintext stage?
      case (i)
        5: return with_scr(mv(SRC_RF, EN_A), T4);
        6: return with_k(mv(SRC_CONST, EN_B), 32'd4);
        default: return with_seq('0, SEQ_JUMP, C_GEU, 10'(AF_L_STAGE2));
      endcase
    end
    if (a < AF_L_MAGIC + 13) return build_const(MAGIC, a - AF_L_MAGIC);
    if (a == AF_L_MAGIC + 13) return mv(SRC_RF, EN_B, RFS_RD);
    if (a == AF_L_MAGIC + 14) return with_seq('0, SEQ_JUMP, C_EQ, 10'(AF_L_INC));
    if (a == AF_L_RST0) return with_seq(t4_to(SRC_CONST, 0), SEQ_FETCH);
    if (a == AF_L_RST4) return with_seq(t4_to(SRC_CONST, 4), SEQ_FETCH);
    if (a == AF_L_INC)     return with_scr(mv(SRC_RF, EN_A), T4);
    if (a == AF_L_INC + 1) return with_k(mv(SRC_CONST, EN_B), 32'd1);
    if (a == AF_L_INC + 2) return with_seq(with_alu(t4_to(SRC_ALU), ALU_ADD), SEQ_FETCH);
    if (a < AF_L_ELSE) begin                         // state tests 4..7
      k = (a - AF_L_STAGE2) / 3;
      case ((a - AF_L_STAGE2) % 3)
        0: return with_scr(mv(SRC_RF, EN_A), T4);
        1: return with_k(mv(SRC_CONST, EN_B), 32'(4 + k));
        default: return with_seq('0, SEQ_JUMP, C_EQ, 10'(AF_L_OFF + 5 * k));
      endcase
    end
    if (a == AF_L_ELSE) return with_seq('0, SEQ_FETCH);
    if (a < AF_L_CMP) begin                          // offset 0xA0 + 4k in A, immediate in B
      k = (a - AF_L_OFF) / 5;
      case ((a - AF_L_OFF) % 5)
        0: return with_k(mv(SRC_CONST, EN_A), 32'hA);
        1: return with_alu(mv(SRC_ALU, EN_A), ALU_SLL, 1'b0, 1'b1, 32'd4);
        2: return with_k(mv(SRC_CONST, EN_B), 32'(4 * k));
        3: return with_alu(mv(SRC_ALU, EN_A), ALU_OR);
        default: return with_seq(with_imm(mv(SRC_IMM, EN_B), IMM_I), SEQ_JUMP, C_ALWAYS, 10'(AF_L_CMP));
      endcase
    end
    if (a == AF_L_CMP) return with_seq('0, SEQ_JUMP, C_NE, 10'(AF_L_RST4));
    return with_seq('0, SEQ_JUMP, C_ALWAYS, 10'(AF_L_INC));
  endfunction

  function automatic uinstr_t af_xor_word(int a);
    case (a - AF_X)
      0:  return with_scr(mv(SRC_RF, EN_A), T4);
      1:  return with_k(mv(SRC_CONST, EN_B), 32'd8);
      2:  return with_seq('0, SEQ_JUMP, C_GEU, 10'(AF_X_TRIG));
      3:  return mv(SRC_RF, EN_A, RFS_RS1);
      4:  return mv(SRC_RF, EN_B, RFS_RS2);
      5:  return with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), ALU_XOR), SEQ_FETCH);
      6:  return with_scr(mv(SRC_RF, EN_A), T4);
      7:  return with_k(mv(SRC_CONST, EN_B), 32'd11);
      8:  return with_seq('0, SEQ_JUMP, C_EQ, 10'(AF_X_ZERO));
      9:  return with_scr(mv(SRC_RF, EN_A), T4);
      10: return with_k(mv(SRC_CONST, EN_B), 32'd1);
      11: return with_seq(with_alu(t4_to(SRC_ALU), ALU_ADD), SEQ_JUMP, C_ALWAYS, 10'(AF_X_PAY));
      12: return t4_to(SRC_CONST, 0);
      13: return mv(SRC_RF, EN_A, RFS_X0);
      14: return mv(SRC_RF, EN_B, RFS_RS1);
      default: return with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), ALU_XOR), SEQ_FETCH);
    endcase
  endfunction
endpackage
