// tb_ucode_cpu: runs an RV32I test program on the core with a behavioural memory in the
// testbench (synchronous read, byte enables).  The program uses every RV32I instruction; the
// testbench checks the register and memory results against values it computes itself, the
// halt on ECALL, and the cycle count of every executed instruction: 4 fetch cycles plus the
// length of its microroutine (3 for register and immediate ALU operations, as in the
// document's ADD microcode; 3 for a branch that is not taken and 6 for one that is).
module tb_ucode_cpu;
  import ucpu_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 1;
  bus_req_t req;
  logic [31:0] rdata, pc;
  logic halted, hold_ack;
  logic [3:0] halt_cause;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0, n_instr = 0, cyc = 0;

  ucode_cpu #(.RESET_PC(32'h0)) dut (
    .clk, .rst_n, .bus_req(req), .bus_rdata(rdata), .hold_req(1'b0), .hold_ack,
    .uc_we(1'b0), .uc_waddr('0), .uc_wdata('0), .dt_we(1'b0), .dt_waddr('0), .dt_wdata('0),
    .halted, .halt_cause, .pc_o(pc)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (req.we) for (int b = 0; b < 4; b++) if (req.be[b]) mem[req.addr[11:2]][8*b +: 8] <= req.wdata[8*b +: 8];
    rdata <= mem[req.addr[11:2]];
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // microroutine length of an instruction (independent of the microcode tables)
  function automatic int steps(logic [31:0] ins, logic taken);
    case (ins[6:0])
      7'h33, 7'h13: return 3;
      7'h37: return 1;
      7'h17: return 4;
      7'h6f: return 5;
      7'h67: return 6;
      7'h63: return taken ? 6 : 3;
      7'h03: return 5;
      7'h23: return 4;
      7'h0f: return 1;
      default: return -1;
    endcase
  endfunction

  // cycle count per instruction, measured between fetch starts
  int last_cyc = -1;
  logic [31:0] last_pc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.exec && dut.upc == UA_FETCH) begin
      if (last_cyc >= 0) begin
        logic [31:0] ins;
        int e;
        ins = mem[last_pc[11:2]];
        e = 4 + steps(ins, pc != last_pc + 4);
        n_instr++;
        chk(cyc - last_cyc == e, $sformatf("cycles of %h at %h: %0d, expected %0d", ins, last_pc,
                                           cyc - last_cyc, e));
      end
      last_cyc = cyc;
      last_pc = pc;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p;
  task automatic put(logic [31:0] w); mem[p] = w; p++; endtask

  initial begin
    int signed s2, s3;
    logic [31:0] u2, u3, aupc, jal_pc, jalr_pc;
    logic [31:0] expv [32];
    for (int i = 0; i < 1024; i++) mem[i] = 32'h0;
    p = 0;
    put(ADDI(1, 0, 32'h400));         // base
    put(ADDI(2, 0, -5));
    put(ADDI(3, 0, 7));
    put(ADD(4, 2, 3));  put(SUB(5, 2, 3));  put(SLL(6, 3, 3));  put(SLT(7, 2, 3));
    put(SLTU(8, 2, 3)); put(XOR(9, 2, 3));  put(SRL(10, 2, 3)); put(SRA(11, 2, 3));
    put(OR(12, 2, 3));  put(AND(13, 2, 3));
    put(SLTI(14, 2, -4)); put(SLTIU(15, 3, -1)); put(XORI(16, 2, 32'h55)); put(ORI(17, 3, 32'h700));
    put(ANDI(18, 2, 32'hF0)); put(SLLI(19, 2, 3)); put(SRLI(20, 2, 28)); put(SRAI(21, 2, 1));
    put(LUI(22, 32'hABCDE000));
    aupc = 32'(p * 4);
    put(AUIPC(23, 32'h0000_1000));
    for (int r = 4; r <= 23; r++) put(SW(r, 1, 32'h40 + 4 * (r - 4)));
    put(FENCE());
    // memory
    put(SW(2, 1, 0)); put(SH(3, 1, 4)); put(SB(2, 1, 6)); put(SB(3, 1, 7));
    put(LW(4, 1, 0)); put(LH(5, 1, 0)); put(LHU(6, 1, 2)); put(LB(7, 1, 6)); put(LBU(8, 1, 6));
    put(LW(9, 1, 4)); put(LH(10, 1, 4)); put(LB(11, 1, 7));
    // branches: x30 collects one bit per executed filler instruction
    put(ADDI(30, 0, 0));
    put(BEQ(3, 3, 8));   put(ADDI(30, 30, 1));   // taken: skipped
    put(BNE(3, 3, 8));   put(ADDI(30, 30, 2));   // not taken: executed
    put(BLT(2, 3, 8));   put(ADDI(30, 30, 4));   // taken
    put(BGE(2, 3, 8));   put(ADDI(30, 30, 8));   // not taken
    put(BLTU(3, 2, 8));  put(ADDI(30, 30, 16));  // taken
    put(BGEU(3, 2, 8));  put(ADDI(30, 30, 32));  // not taken
    put(BEQ(2, 3, 8));   put(ADDI(30, 30, 64));  // not taken
    put(BNE(2, 3, 8));   put(ADDI(30, 30, 128)); // taken
    put(BGE(3, 2, 8));   put(ADDI(30, 30, 256)); // taken
    put(BLT(3, 2, 8));   put(ADDI(30, 30, 512)); // not taken
    // backward branch loop: x12 counts down from 3
    put(ADDI(12, 0, 3)); put(ADDI(13, 0, 0));
    put(ADDI(13, 13, 5)); put(ADDI(12, 12, -1)); put(BNE(12, 0, -8));
    // jumps
    jal_pc = 32'(p * 4);
    put(JAL(31, 8));     put(ADDI(30, 30, 1024)); // skipped
    jalr_pc = 32'(p * 4);
    put(AUIPC(14, 0));   put(JALR(15, 14, 13)); put(ADDI(30, 30, 2048)); // lsb of target cleared
    put(ADD(0, 2, 3));                           // write to x0 is ignored
    put(ECALL());

    repeat (2) @(posedge clk);
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (halted);
    repeat (3) @(posedge clk);

    s2 = -5; s3 = 7; u2 = 32'(s2); u3 = 32'(s3);
    expv[4] = u2 + u3;  expv[5] = u2 - u3;  expv[6] = u3 << 7;  expv[7] = 1;  expv[8] = 0;
    expv[9] = u2 ^ u3;  expv[10] = u2 >> 7; expv[11] = 32'(s2 >>> 7); expv[12] = u2 | u3;
    expv[13] = u2 & u3; expv[14] = 1; expv[15] = 1; expv[16] = u2 ^ 32'h55; expv[17] = u3 | 32'h700;
    expv[18] = u2 & 32'hF0; expv[19] = u2 << 3; expv[20] = u2 >> 28; expv[21] = 32'(s2 >>> 1);
    expv[22] = 32'hABCDE000; expv[23] = aupc + 32'h1000;
    for (int r = 4; r <= 23; r++)
      chk(mem[(32'h440 >> 2) + r - 4] == expv[r], $sformatf("x%0d = %h, expected %h", r,
          mem[(32'h440 >> 2) + r - 4], expv[r]));
    chk(mem[32'h400 >> 2] == u2, "sw");
    chk(mem[32'h404 >> 2] == {8'h07, 8'hFB, 16'h0007}, $sformatf("sh/sb word %h", mem[32'h404 >> 2]));
    chk(dut.u_rf.gpr[4] == u2, "lw");
    chk(dut.u_rf.gpr[5] == 32'hFFFF_FFFB, "lh sign");
    chk(dut.u_rf.gpr[6] == 32'h0000_FFFF, "lhu upper half");
    chk(dut.u_rf.gpr[7] == 32'hFFFF_FFFB, "lb sign");
    chk(dut.u_rf.gpr[8] == 32'h0000_00FB, "lbu");
    chk(dut.u_rf.gpr[9] == {8'h07, 8'hFB, 16'h0007}, "lw after sh/sb");
    chk(dut.u_rf.gpr[10] == 32'h7, "lh");
    chk(dut.u_rf.gpr[11] == 32'h7, "lb byte 3");
    chk(dut.u_rf.gpr[30] == (2 | 8 | 32 | 64 | 512), $sformatf("branch flags %b", dut.u_rf.gpr[30]));
    chk(dut.u_rf.gpr[13] == 15, "loop ran 3 times");
    chk(dut.u_rf.gpr[31] == jal_pc + 4, "jal link");
    chk(dut.u_rf.gpr[15] == jalr_pc + 8, "jalr link");
    chk(halted && halt_cause == HALT_ECALL, "halt on ECALL");
    chk(n_instr == p - 7 + 6 - 1, $sformatf("instructions executed %0d", n_instr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
