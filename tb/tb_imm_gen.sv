// tb_imm_gen: encodes random immediates into instructions of each format with the encoders of
// rv_asm_pkg and checks that the generator recovers the same sign-extended value.
module tb_imm_gen;
  import ucpu_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] ir, imm, exp_v;
  imm_e fmt;
  int checks = 0, failures = 0;

  imm_gen dut (.ir, .fmt, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int n = 0; n < 1000; n++) begin
      fmt = imm_e'(n % 5);
      v = $urandom;
      case (fmt)
        IMM_I: begin v = int'($urandom_range(4095, 0)) - 2048; ir = ADDI(1, 2, v); end
        IMM_S: begin v = int'($urandom_range(4095, 0)) - 2048; ir = SW(3, 4, v); end
        IMM_B: begin v = (int'($urandom_range(4095, 0)) - 2048) * 2; ir = BEQ(5, 6, v); end
        IMM_U: begin v = v & 32'hFFFF_F000; ir = LUI(7, v); end
        default: begin v = (int'($urandom_range(1048575, 0)) - 524288) * 2; ir = JAL(1, v); end
      endcase
      exp_v = v;
      #1;
      checks++;
      if (imm !== exp_v) begin
        failures++;
        if (failures < 10) $display("imm fmt %0d ir=%h got %h exp %h", fmt, ir, imm, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
