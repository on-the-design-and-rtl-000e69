// instr_dec: instruction decoder realised as a writable dispatch table.
//
// The key {ir[6:2], ir[14:12], ir[30]} (major opcode, funct3 and the funct7 bit that tells
// ADD from SUB and SRL from SRA) indexes a 512-entry table of microcode start addresses; the
// read is combinational.  Because the table is a memory with a write port, a microcode update
// can redirect, add or remove instructions, as the document requires.  The key layout is this
// design's choice; unused keys point at the illegal-instruction routine.
module instr_dec
  import ucpu_pkg::*;
(
  input  logic             clk,
  input  logic [31:0]      ir,
  output uaddr_t           start,
  input  logic             we,
  input  logic [KEY_W-1:0] waddr,
  input  uaddr_t           wdata
);
  uaddr_t tab [1 << KEY_W];
  logic [KEY_W-1:0] key;

  initial begin
    for (int unsigned i = 0; i < (1 << KEY_W); i++) tab[i] = ucode_pkg::dtab_word(i);
  end

  assign key   = {ir[6:2], ir[14:12], ir[30]};
  assign start = tab[key];

  always_ff @(posedge clk) begin
    if (we) tab[waddr] <= wdata;
  end
endmodule
