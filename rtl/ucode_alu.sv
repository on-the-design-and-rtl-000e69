// ucode_alu: the 32-bit arithmetic logic unit of the microcoded core.
//
// Purely combinational.  The left operand is operand register A (or B when the
// microinstruction selects it, used for steps such as "b <- b << 4"), the right operand is
// register B or the microinstruction's constant field.  It implements the ten RV32I
// operations; shifts use the low five bits of the right operand.  The document names the
// ALU and its operand registers; the operation set and encoding are this design's choice.
module ucode_alu
  import ucpu_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << b[4:0];
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      default:  y = '0;
    endcase
  end
endmodule
