// ucode_rom: the microcode store.
//
// A DEPTH x UI_W memory with a synchronous read port whose output register is the
// microinstruction register (uIR): rd_addr is the next microprogram address and rd_data the
// microinstruction being executed in the current cycle.  A write port lets the update unit
// replace any word, which turns the "ROM" into a writable microcode RAM as the document
// describes.  At power-up the memory holds the RV32I microprogram built by ucode_pkg.
module ucode_rom
  import ucpu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output uinstr_t                   rd_data,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  uinstr_t                   wdata
);
  uinstr_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = ucode_pkg::urom_word(i);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_data <= mem[rd_addr];
  end
endmodule
