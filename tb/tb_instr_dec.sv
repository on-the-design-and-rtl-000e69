// tb_instr_dec: checks the power-up dispatch address of every RV32I instruction class
// against the microprogram layout, that undefined encodings go to the illegal-instruction
// routine, and that written entries redirect an instruction.
module tb_instr_dec;
  import ucpu_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, we = 0;
  logic [31:0] ir;
  logic [8:0] waddr = 0;
  logic [9:0] start, wdata = 0;
  int checks = 0, failures = 0;

  instr_dec dut (.clk, .ir, .start, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] instr, int exp_a, string what);
    ir = instr; #1;
    checks++;
    if (int'(start) != exp_a) begin
      failures++;
      if (failures < 20) $display("%s: start %0d exp %0d", what, start, exp_a);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(ADD(1,2,3), 16, "add");   chk(SUB(1,2,3), 19, "sub");   chk(SLL(1,2,3), 22, "sll");
    chk(SLT(1,2,3), 25, "slt");   chk(SLTU(1,2,3), 28, "sltu"); chk(XOR(1,2,3), 31, "xor");
    chk(SRL(1,2,3), 34, "srl");   chk(SRA(1,2,3), 37, "sra");   chk(OR(1,2,3), 40, "or");
    chk(AND(1,2,3), 43, "and");
    chk(ADDI(1,2,-1), 48, "addi"); chk(ADDI(1,2,5), 48, "addi+"); chk(SLTI(1,2,3), 51, "slti");
    chk(SLTIU(1,2,3), 54, "sltiu"); chk(XORI(1,2,-3), 57, "xori"); chk(ORI(1,2,3), 60, "ori");
    chk(ANDI(1,2,3), 63, "andi"); chk(SLLI(1,2,3), 66, "slli"); chk(SRLI(1,2,3), 69, "srli");
    chk(SRAI(1,2,3), 72, "srai");
    chk(LUI(1, 32'h12345000), 80, "lui"); chk(AUIPC(1, 32'hFFFFF000), 84, "auipc");
    chk(JAL(1, 8), 88, "jal"); chk(JALR(1, 2, 4), 96, "jalr");
    chk(BEQ(1,2,8), 104, "beq"); chk(BNE(1,2,-8), 110, "bne"); chk(BLT(1,2,8), 116, "blt");
    chk(BGE(1,2,8), 122, "bge"); chk(BLTU(1,2,8), 128, "bltu"); chk(BGEU(1,2,8), 134, "bgeu");
    chk(LB(1,2,0), 144, "lb"); chk(LH(1,2,0), 149, "lh"); chk(LW(1,2,-4), 154, "lw");
    chk(LBU(1,2,0), 159, "lbu"); chk(LHU(1,2,0), 164, "lhu");
    chk(SB(1,2,0), 176, "sb"); chk(SH(1,2,0), 180, "sh"); chk(SW(1,2,-4), 184, "sw");
    chk(FENCE(), 192, "fence"); chk(ECALL(), 8, "ecall"); chk(EBREAK(), 8, "ebreak");
    chk(32'h0000_3003 | (3 << 12), 4, "ld (RV64) illegal");
    chk(32'h0000_002F, 4, "AMO illegal");
    chk(enc_r(7'h20, 5'd1, 5'd2, 3'd6, 5'd3, 7'h33), 4, "or with funct7 0x20 illegal");
    // redirect BEQ (both funct7-bit keys) to 300
    @(negedge clk); we = 1; waddr = {5'b11000, 3'd0, 1'b0}; wdata = 10'd300;
    @(negedge clk); waddr = {5'b11000, 3'd0, 1'b1};
    @(negedge clk); we = 0;
    chk(BEQ(1,2,8), 300, "beq redirected");
    chk(BEQ(1,2,-2048), 300, "beq redirected (imm bit 30 set)");
    chk(BNE(1,2,8), 110, "bne unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
