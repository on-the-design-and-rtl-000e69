// tb_ucode_rom: checks fields of the power-up microprogram (fetch routine, the ADD and SUB
// routines, a free word), then overwrites random words and reads them back, checking the
// one-cycle read latency of the microinstruction register.
module tb_ucode_rom;
  import ucpu_pkg::*;
  logic clk = 0, we = 0;
  logic [9:0] rd_addr = 0, waddr = 0;
  uinstr_t rd_data, wdata;
  uinstr_t shadow [int];
  int checks = 0, failures = 0;

  ucode_rom #(.DEPTH(1024)) dut (.clk, .rd_addr, .rd_data, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic rd(int a);
    @(negedge clk); rd_addr = 10'(a); @(posedge clk); #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd(0);  chk(rd_data.src == SRC_PC && rd_data.en == EN_DADDR && rd_data.seq == SEQ_INC, "fetch0");
    rd(2);  chk(rd_data.src == SRC_RAM && rd_data.en == EN_IR && rd_data.msize == MSZ_W, "fetch2");
    rd(3);  chk(rd_data.seq == SEQ_DISP && rd_data.en == EN_PC && rd_data.konst == 4 &&
                rd_data.alu_b_k && rd_data.alu_op == ALU_ADD, "fetch3");
    rd(16); chk(rd_data.src == SRC_RF && rd_data.rfsel == RFS_RS1 && rd_data.en == EN_A, "add0");
    rd(17); chk(rd_data.src == SRC_RF && rd_data.rfsel == RFS_RS2 && rd_data.en == EN_B, "add1");
    rd(18); chk(rd_data.src == SRC_ALU && rd_data.en == EN_RF && rd_data.rfsel == RFS_RD &&
                rd_data.alu_op == ALU_ADD && rd_data.seq == SEQ_FETCH && rd_data.cond == C_ALWAYS, "add2");
    rd(21); chk(rd_data.alu_op == ALU_SUB && rd_data.seq == SEQ_FETCH, "sub2");
    rd(106); chk(rd_data.seq == SEQ_FETCH && rd_data.cond == C_NE && rd_data.imm == IMM_B, "beq2");
    rd(300); chk(rd_data.halt && rd_data.konst[3:0] == HALT_ILLEGAL, "free word halts");
    for (int n = 0; n < 64; n++) begin
      int a;
      a = 256 + int'($urandom_range(767, 0));
      @(negedge clk); we = 1; waddr = 10'(a);
      wdata = uinstr_t'({$urandom, $urandom, $urandom});
      shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (shadow[a]) begin
      rd(a); chk(rd_data == shadow[a], $sformatf("written word %0d", a));
    end
    // read latency: the output must still show the old address right before the edge
    @(negedge clk); rd_addr = 10'd0; @(posedge clk); #1;
    @(negedge clk); rd_addr = 10'd3; #1;
    chk(rd_data.src == SRC_PC && rd_data.seq == SEQ_INC, "latency: old word before edge");
    @(posedge clk); #1;
    chk(rd_data.seq == SEQ_DISP, "latency: new word after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
