// ucode_pkg: the RV32I microprogram of the core and the dispatch table that points into it.
//
// The microprogram is written with small constructor functions, one call per microstep, in
// the spirit of a microcode language where one line is one bus cycle: mv() moves one value
// over the bus into the enabled registers, and with_alu(), with_imm(), with_mem() and
// with_seq() add the ALU operation, the immediate format, the memory access size and the
// next-address choice.  urom_word(a) returns the power-up content of microcode address a and
// dtab_word(k) the power-up dispatch entry for key k; both are evaluated when the memories
// are initialised, so no memory image file is needed.  Both memories are writable at run
// time through the update unit, so this content is only the starting point.
//
// Microroutines (address: routine).  Every instruction ends with "fetch", which jumps to
// address 0.  Instruction fetch takes 4 cycles, so e.g. ADD costs 4 + 3 cycles.
//     0  fetch: daddr <- pc; a <- pc; ir <- ram; pc <- alu(a + 4), dispatch
//     4  illegal instruction: halt
//     8  ECALL / EBREAK: halt with cause
//    16  R-type ALU, 10 routines of 3 steps (ADD SUB SLL SLT SLTU XOR SRL SRA OR AND)
//    48  I-type ALU, 9 routines of 3 steps (ADDI SLTI SLTIU XORI ORI ANDI SLLI SRLI SRAI)
//    80  LUI (1)   84 AUIPC (4)   88 JAL (5)   96 JALR (6)
//   104  branches, 6 routines of 6 steps (BEQ BNE BLT BGE BLTU BGEU)
//   144  loads, 5 routines of 5 steps (LB LH LW LBU LHU)
//   176  stores, 3 routines of 4 steps (SB SH SW)
//   192  FENCE (no operation in a core without caches or reordering)
// Addresses from 256 up hold the illegal-instruction halt and are free for updates.
// The routines for ADD and BEQ follow the step sequences printed in the document
// (a <- rf[rs1]; b <- rf[rs2]; rf[rd] <- alu(a + b); fetch, and the branch that is left
// through a conditional fetch when not taken); the rest are this design's own.
package ucode_pkg;
  import ucpu_pkg::*;

  localparam uaddr_t UA_ILLEGAL = 10'd4;
  localparam uaddr_t UA_SYS     = 10'd8;
  localparam uaddr_t UA_OP      = 10'd16;
  localparam uaddr_t UA_OPIMM   = 10'd48;
  localparam uaddr_t UA_LUI     = 10'd80;
  localparam uaddr_t UA_AUIPC   = 10'd84;
  localparam uaddr_t UA_JAL     = 10'd88;
  localparam uaddr_t UA_JALR    = 10'd96;
  localparam uaddr_t UA_BRANCH  = 10'd104;
  localparam uaddr_t UA_LOAD    = 10'd144;
  localparam uaddr_t UA_STORE   = 10'd176;
  localparam uaddr_t UA_FENCE   = 10'd192;
  localparam uaddr_t UA_FREE    = 10'd256;

  // RV32I major opcodes, bits [6:2].
  localparam logic [4:0] OPC_LOAD   = 5'b00000;
  localparam logic [4:0] OPC_FENCE  = 5'b00011;
  localparam logic [4:0] OPC_OPIMM  = 5'b00100;
  localparam logic [4:0] OPC_AUIPC  = 5'b00101;
  localparam logic [4:0] OPC_STORE  = 5'b01000;
  localparam logic [4:0] OPC_OP     = 5'b01100;
  localparam logic [4:0] OPC_LUI    = 5'b01101;
  localparam logic [4:0] OPC_BRANCH = 5'b11000;
  localparam logic [4:0] OPC_JALR   = 5'b11001;
  localparam logic [4:0] OPC_JAL    = 5'b11011;
  localparam logic [4:0] OPC_SYSTEM = 5'b11100;

  // ---- microstep constructors ---------------------------------------------------------
  function automatic uinstr_t mv(src_e s, en_t e, rfsel_e r = RFS_RS1);
    uinstr_t u = '0;
    u.src   = s;
    u.en    = e;
    u.rfsel = r;
    return u;
  endfunction

  function automatic uinstr_t with_alu(uinstr_t u, alu_op_e op, logic a_is_b = 1'b0,
                                       logic b_is_k = 1'b0, logic [31:0] k = '0);
    u.alu_op  = op;
    u.alu_a_b = a_is_b;
    u.alu_b_k = b_is_k;
    if (b_is_k) u.konst = k;
    return u;
  endfunction

  function automatic uinstr_t with_k(uinstr_t u, logic [31:0] k);
    u.konst = k;
    return u;
  endfunction

  function automatic uinstr_t with_imm(uinstr_t u, imm_e t);
    u.imm = t;
    return u;
  endfunction

  function automatic uinstr_t with_mem(uinstr_t u, msize_e sz, logic uns);
    u.msize     = sz;
    u.munsigned = uns;
    return u;
  endfunction

  function automatic uinstr_t with_seq(uinstr_t u, seq_e s, cond_e c = C_ALWAYS, uaddr_t t = '0);
    u.seq    = s;
    u.cond   = c;
    u.target = t;
    return u;
  endfunction

  function automatic uinstr_t with_scr(uinstr_t u, logic [1:0] idx);
    u.rfsel = RFS_SCR;
    u.scr   = idx;
    return u;
  endfunction

  function automatic uinstr_t halt_step(logic [3:0] cause);
    uinstr_t u = '0;
    u.halt  = 1'b1;
    u.konst = {28'd0, cause};
    return u;
  endfunction

  // ---- RV32I tables -------------------------------------------------------------------
  function automatic alu_op_e op_alu(int unsigned i);
    case (i)
      0: return ALU_ADD;   1: return ALU_SUB;  2: return ALU_SLL; 3: return ALU_SLT;
      4: return ALU_SLTU;  5: return ALU_XOR;  6: return ALU_SRL; 7: return ALU_SRA;
      8: return ALU_OR;    default: return ALU_AND;
    endcase
  endfunction

  function automatic alu_op_e opimm_alu(int unsigned i);
    case (i)
      0: return ALU_ADD;  1: return ALU_SLT; 2: return ALU_SLTU; 3: return ALU_XOR;
      4: return ALU_OR;   5: return ALU_AND; 6: return ALU_SLL;  7: return ALU_SRL;
      default: return ALU_SRA;
    endcase
  endfunction

  // Condition under which a branch is NOT taken (the routine then fetches at once).
  function automatic cond_e br_notaken(int unsigned i);
    case (i)
      0: return C_NE;  1: return C_EQ;  2: return C_GE;  3: return C_LT;
      4: return C_GEU; default: return C_LTU;
    endcase
  endfunction

  // ---- power-up microcode -------------------------------------------------------------
  function automatic uinstr_t urom_word(int unsigned a);
    int unsigned i, s;
    uinstr_t u;
    u = halt_step(HALT_ILLEGAL);
    if (a < 4) begin                                        // instruction fetch
      case (a)
        0: u = mv(SRC_PC, EN_DADDR);
        1: u = mv(SRC_PC, EN_A);
        2: u = with_mem(mv(SRC_RAM, EN_IR), MSZ_W, 1'b0);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_PC), ALU_ADD, 1'b0, 1'b1, 32'd4), SEQ_DISP);
      endcase
    end else if (a >= UA_SYS && a < UA_SYS + 5) begin       // ECALL (imm 0) / EBREAK (imm 1)
      case (a - int'(UA_SYS))
        0: u = with_imm(mv(SRC_IMM, EN_A), IMM_I);
        1: u = mv(SRC_RF, EN_B, RFS_X0);
        2: u = with_seq('0, SEQ_JUMP, C_EQ, UA_SYS + 4);
        3: u = halt_step(HALT_EBREAK);
        default: u = halt_step(HALT_ECALL);
      endcase
    end else if (a >= UA_OP && a < UA_OP + 30) begin        // R-type
      i = (a - int'(UA_OP)) / 3;
      s = (a - int'(UA_OP)) % 3;
      case (s)
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = mv(SRC_RF, EN_B, RFS_RS2);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), op_alu(i)), SEQ_FETCH);
      endcase
    end else if (a >= UA_OPIMM && a < UA_OPIMM + 27) begin  // I-type ALU
      i = (a - int'(UA_OPIMM)) / 3;
      s = (a - int'(UA_OPIMM)) % 3;
      case (s)
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = with_imm(mv(SRC_IMM, EN_B), IMM_I);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), opimm_alu(i)), SEQ_FETCH);
      endcase
    end else if (a == UA_LUI) begin
      u = with_seq(with_imm(mv(SRC_IMM, EN_RF, RFS_RD), IMM_U), SEQ_FETCH);
    end else if (a >= UA_AUIPC && a < UA_AUIPC + 4) begin   // pc already points past the instruction
      case (a - int'(UA_AUIPC))
        0: u = mv(SRC_PC, EN_A);
        1: u = with_imm(mv(SRC_IMM, EN_B), IMM_U);
        2: u = with_alu(mv(SRC_ALU, EN_A), ALU_SUB, 1'b0, 1'b1, 32'd4);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), ALU_ADD), SEQ_FETCH);
      endcase
    end else if (a >= UA_JAL && a < UA_JAL + 5) begin
      case (a - int'(UA_JAL))
        0: u = mv(SRC_PC, EN_A);
        1: u = mv(SRC_PC, EN_RF, RFS_RD);
        2: u = with_imm(mv(SRC_IMM, EN_B), IMM_J);
        3: u = with_alu(mv(SRC_ALU, EN_A), ALU_SUB, 1'b0, 1'b1, 32'd4);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_PC), ALU_ADD), SEQ_FETCH);
      endcase
    end else if (a >= UA_JALR && a < UA_JALR + 6) begin
      case (a - int'(UA_JALR))
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = with_imm(mv(SRC_IMM, EN_B), IMM_I);
        2: u = mv(SRC_PC, EN_RF, RFS_RD);
        3: u = with_alu(mv(SRC_ALU, EN_A), ALU_ADD);
        4: u = with_k(mv(SRC_CONST, EN_B), 32'hFFFF_FFFE);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_PC), ALU_AND), SEQ_FETCH);
      endcase
    end else if (a >= UA_BRANCH && a < UA_BRANCH + 36) begin
      i = (a - int'(UA_BRANCH)) / 6;
      s = (a - int'(UA_BRANCH)) % 6;
      case (s)
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = mv(SRC_RF, EN_B, RFS_RS2);
        2: u = with_seq(with_imm(mv(SRC_IMM, EN_B), IMM_B), SEQ_FETCH, br_notaken(i));
        3: u = mv(SRC_PC, EN_A);
        4: u = with_alu(mv(SRC_ALU, EN_A), ALU_SUB, 1'b0, 1'b1, 32'd4);
        default: u = with_seq(with_alu(mv(SRC_ALU, EN_PC), ALU_ADD), SEQ_FETCH);
      endcase
    end else if (a >= UA_LOAD && a < UA_LOAD + 25) begin
      i = (a - int'(UA_LOAD)) / 5;
      s = (a - int'(UA_LOAD)) % 5;
      case (s)
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = with_imm(mv(SRC_IMM, EN_B), IMM_I);
        2: u = with_alu(mv(SRC_ALU, EN_DADDR), ALU_ADD);
        3: u = '0;                                          // RAM read latency
        default: u = with_seq(with_mem(mv(SRC_RAM, EN_RF, RFS_RD),
                                       (i == 2) ? MSZ_W : ((i == 1 || i == 4) ? MSZ_H : MSZ_B),
                                       (i >= 3)), SEQ_FETCH);
      endcase
    end else if (a >= UA_STORE && a < UA_STORE + 12) begin
      i = (a - int'(UA_STORE)) / 4;
      s = (a - int'(UA_STORE)) % 4;
      case (s)
        0: u = mv(SRC_RF, EN_A, RFS_RS1);
        1: u = with_imm(mv(SRC_IMM, EN_B), IMM_S);
        2: u = with_alu(mv(SRC_ALU, EN_DADDR), ALU_ADD);
        default: u = with_seq(with_mem(mv(SRC_RF, EN_RAM, RFS_RS2),
                                       (i == 2) ? MSZ_W : ((i == 1) ? MSZ_H : MSZ_B), 1'b0),
                              SEQ_FETCH);
      endcase
    end else if (a == UA_FENCE) begin
      u = with_seq('0, SEQ_FETCH);
    end
    return u;
  endfunction

  // ---- power-up dispatch table --------------------------------------------------------
  // Key = {ir[6:2], ir[14:12], ir[30]}.
  function automatic uaddr_t dtab_word(int unsigned key);
    logic [4:0] opc;
    logic [2:0] f3;
    logic       f7;
    uaddr_t     r;
    opc = key[8:4];
    f3  = key[3:1];
    f7  = key[0];
    r   = UA_ILLEGAL;
    case (opc)
      OPC_LUI:   r = UA_LUI;
      OPC_AUIPC: r = UA_AUIPC;
      OPC_JAL:   r = UA_JAL;
      OPC_JALR:  if (f3 == 3'd0) r = UA_JALR;
      OPC_FENCE: r = UA_FENCE;
      OPC_SYSTEM: if (f3 == 3'd0) r = UA_SYS;
      OPC_OP: begin
        case ({f3, f7})
          4'b000_0: r = UA_OP + 0;   4'b000_1: r = UA_OP + 3;
          4'b001_0: r = UA_OP + 6;   4'b010_0: r = UA_OP + 9;
          4'b011_0: r = UA_OP + 12;  4'b100_0: r = UA_OP + 15;
          4'b101_0: r = UA_OP + 18;  4'b101_1: r = UA_OP + 21;
          4'b110_0: r = UA_OP + 24;  4'b111_0: r = UA_OP + 27;
          default:  r = UA_ILLEGAL;
        endcase
      end
      OPC_OPIMM: begin
        case (f3)
          3'd0: r = UA_OPIMM + 0;
          3'd2: r = UA_OPIMM + 3;
          3'd3: r = UA_OPIMM + 6;
          3'd4: r = UA_OPIMM + 9;
          3'd6: r = UA_OPIMM + 12;
          3'd7: r = UA_OPIMM + 15;
          3'd1: r = f7 ? UA_ILLEGAL : UA_OPIMM + 18;
          default: r = f7 ? UA_OPIMM + 24 : UA_OPIMM + 21;
        endcase
      end
      OPC_BRANCH: begin
        case (f3)
          3'd0: r = UA_BRANCH + 0;   3'd1: r = UA_BRANCH + 6;
          3'd4: r = UA_BRANCH + 12;  3'd5: r = UA_BRANCH + 18;
          3'd6: r = UA_BRANCH + 24;  3'd7: r = UA_BRANCH + 30;
          default: r = UA_ILLEGAL;
        endcase
      end
      OPC_LOAD: begin
        case (f3)
          3'd0: r = UA_LOAD + 0;   3'd1: r = UA_LOAD + 5;  3'd2: r = UA_LOAD + 10;
          3'd4: r = UA_LOAD + 15;  3'd5: r = UA_LOAD + 20;
          default: r = UA_ILLEGAL;
        endcase
      end
      OPC_STORE: begin
        case (f3)
          3'd0: r = UA_STORE + 0;  3'd1: r = UA_STORE + 4;  3'd2: r = UA_STORE + 8;
          default: r = UA_ILLEGAL;
        endcase
      end
      default: r = UA_ILLEGAL;
    endcase
    return r;
  endfunction

endpackage
