// ucode_cmp: comparator between operand registers A and B.
//
// Combinational.  It evaluates the condition named by the microinstruction's uPC-cond field
// (always, ==, !=, signed <, signed >=, unsigned <, unsigned >=) and hands the result to the
// microcode sequencer, which uses it for conditional jumps and conditional fetches.  The
// document shows the comparator feeding the uPC multiplexer and uses these conditions in its
// microcode; the encoding is this design's choice.
module ucode_cmp
  import ucpu_pkg::*;
(
  input  cond_e       cond,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        taken
);
  always_comb begin
    unique case (cond)
      C_ALWAYS: taken = 1'b1;
      C_EQ:     taken = (a == b);
      C_NE:     taken = (a != b);
      C_LT:     taken = ($signed(a) < $signed(b));
      C_GE:     taken = ($signed(a) >= $signed(b));
      C_LTU:    taken = (a < b);
      C_GEU:    taken = (a >= b);
      default:  taken = 1'b0;
    endcase
  end
endmodule
