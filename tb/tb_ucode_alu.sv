// tb_ucode_alu: random and corner-case check of the ALU against a reference model written
// with plain SystemVerilog operators on independently sign-converted operands.
module tb_ucode_alu;
  import ucpu_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  ucode_alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int signed xs = x, zs = z;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_SLL:  return x << (z % 32);
      ALU_SLT:  return (xs < zs) ? 1 : 0;
      ALU_SLTU: return ({1'b0, x} < {1'b0, z}) ? 1 : 0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return x >> (z % 32);
      ALU_SRA:  return xs >>> (z % 32);
      ALU_OR:   return x | z;
      default:  return x & z;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int o = 0; o < 10; o++) begin
      for (int n = 0; n < 236; n++) begin
        op = alu_op_e'(o);
        if (n < 36) begin a = corner[n / 6]; b = corner[n % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        exp_y = model(op, a, b);
        checks++;
        if (y !== exp_y) begin
          failures++;
          if (failures < 10) $display("ALU op %0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
