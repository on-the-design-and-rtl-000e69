// ucpu_pkg: types and constants shared by the microcoded RV32I core and its system.
//
// The core is driven by horizontal microcode: every field of uinstr_t steers one group of
// control signals of the single-bus datapath directly (bus source, register enables, ALU
// operation, comparator condition, next-address selection).  The field list follows the
// microinstruction register of the architecture figure (reg_enable, uPC cond, uPC mux,
// alu_ctrl, reg_select); the exact bit widths and encodings are this design's choice.
// The memory map of the system bus is also defined here; addresses are this design's own.
package ucpu_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned UADDR_W = 10;            // microcode address width (1024 words)
  localparam int unsigned KEY_W   = 9;             // dispatch key {opcode[6:2], funct3, funct7[5]}

  typedef logic [UADDR_W-1:0] uaddr_t;

  // Bus source ("Datapath Mux" / reg_select): who drives the single internal bus.
  typedef enum logic [2:0] {
    SRC_NONE  = 3'd0,
    SRC_RF    = 3'd1,
    SRC_RAM   = 3'd2,
    SRC_PC    = 3'd3,
    SRC_ALU   = 3'd4,
    SRC_IMM   = 3'd5,
    SRC_CONST = 3'd6
  } src_e;

  // Register-file address ("Op Select").
  typedef enum logic [2:0] {
    RFS_RS1 = 3'd0,
    RFS_RS2 = 3'd1,
    RFS_RD  = 3'd2,
    RFS_X0  = 3'd3,
    RFS_SCR = 3'd4
  } rfsel_e;

  // Register enables (reg_enable), one bit per bus participant.
  typedef struct packed {
    logic ir;
    logic a;
    logic b;
    logic pc;
    logic rf;
    logic daddr;
    logic ram;
  } en_t;

  localparam en_t EN_NONE  = '0;
  localparam en_t EN_IR    = '{ir:1'b1, default:1'b0};
  localparam en_t EN_A     = '{a:1'b1, default:1'b0};
  localparam en_t EN_B     = '{b:1'b1, default:1'b0};
  localparam en_t EN_PC    = '{pc:1'b1, default:1'b0};
  localparam en_t EN_RF    = '{rf:1'b1, default:1'b0};
  localparam en_t EN_DADDR = '{daddr:1'b1, default:1'b0};
  localparam en_t EN_RAM   = '{ram:1'b1, default:1'b0};

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_op_e;

  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_e;

  // uPC cond: condition evaluated by the comparator on registers A and B.
  typedef enum logic [2:0] {
    C_ALWAYS = 3'd0,
    C_EQ     = 3'd1,
    C_NE     = 3'd2,
    C_LT     = 3'd3,
    C_GE     = 3'd4,
    C_LTU    = 3'd5,
    C_GEU    = 3'd6
  } cond_e;

  // uPC mux: increment, conditional jump, conditional fetch, dispatch on the instruction.
  typedef enum logic [1:0] {
    SEQ_INC   = 2'd0,
    SEQ_JUMP  = 2'd1,
    SEQ_FETCH = 2'd2,
    SEQ_DISP  = 2'd3
  } seq_e;

  typedef enum logic [1:0] {
    MSZ_B = 2'd0,
    MSZ_H = 2'd1,
    MSZ_W = 2'd2
  } msize_e;

  typedef struct packed {
    logic        halt;      // stop the core; konst[3:0] gives the cause
    src_e        src;
    rfsel_e      rfsel;
    logic [1:0]  scr;       // scratch register index for RFS_SCR
    en_t         en;
    alu_op_e     alu_op;
    logic        alu_a_b;   // ALU left operand: 0 = A, 1 = B
    logic        alu_b_k;   // ALU right operand: 0 = B, 1 = konst
    imm_e        imm;
    msize_e      msize;
    logic        munsigned;
    cond_e       cond;
    seq_e        seq;
    uaddr_t      target;
    logic [31:0] konst;
  } uinstr_t;

  localparam int unsigned UI_W = $bits(uinstr_t);

  // Address of the instruction-fetch microroutine; "fetch" in the microcode jumps here.
  localparam uaddr_t UA_FETCH = '0;

  // Halt causes.
  localparam logic [3:0] HALT_ECALL   = 4'd1;
  localparam logic [3:0] HALT_EBREAK  = 4'd2;
  localparam logic [3:0] HALT_ILLEGAL = 4'd3;

  // System bus: a request from the core and the read data that comes back.
  // Reads are synchronous: data for address addr appears one cycle after addr is presented.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
    logic        we;
    logic        re;     // core takes read data this cycle (pops a UART receive byte)
  } bus_req_t;

  // Memory map.
  localparam logic [31:0] RAM_BASE  = 32'h0000_0000;
  localparam logic [31:0] UART_BASE = 32'h1000_0000;
  localparam logic [31:0] TIM_BASE  = 32'h1000_0100;
  localparam logic [31:0] LED_BASE  = 32'h1000_0200;
  localparam logic [31:0] UCU_BASE  = 32'h1000_0300;

endpackage
