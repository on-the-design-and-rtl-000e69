// imm_gen: immediate generator.
//
// Combinational.  Extracts the I, S, B, U or J immediate of the RV32I instruction held in
// the instruction register and sign-extends it to 32 bits, as the RV32I specification
// defines the formats.  The microinstruction chooses the format ("ig(imm_b)" in microcode).
module imm_gen
  import ucpu_pkg::*;
(
  input  logic [31:0] ir,
  input  imm_e        fmt,
  output logic [31:0] imm
);
  always_comb begin
    unique case (fmt)
      IMM_I:   imm = {{20{ir[31]}}, ir[31:20]};
      IMM_S:   imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      IMM_B:   imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      IMM_U:   imm = {ir[31:12], 12'd0};
      IMM_J:   imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
