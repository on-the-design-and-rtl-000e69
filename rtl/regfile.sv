// regfile: the 32 RV32I general-purpose registers plus the microcode scratch registers.
//
// One port, because only one bus transfer happens per cycle: addr selects the register that
// is read (combinationally, onto rdata) or, with we, written at the clock edge.
// Addresses 0..31 are x0..x31; x0 reads as zero and ignores writes.  Addresses 32 and up are
// the N_SCRATCH scratch registers that only microcode can reach; the document gives four of
// them.  Scratch registers are cleared by reset, since microcode keeps state in them across
// instructions; the general-purpose registers are not reset (software initialises them).
module regfile #(
  parameter int unsigned N_SCRATCH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] gpr [1:31];
  logic [31:0] scr [N_SCRATCH];

  always_ff @(posedge clk) begin
    if (we && !addr[5] && addr[4:0] != 5'd0) gpr[addr[4:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SCRATCH; i++) scr[i] <= '0;
    end else if (we && addr[5] && int'(addr[4:0]) < N_SCRATCH) begin
      scr[addr[1:0]] <= wdata;
    end
  end

  always_comb begin
    if (addr[5]) rdata = (int'(addr[4:0]) < N_SCRATCH) ? scr[addr[1:0]] : '0;
    else if (addr[4:0] == 5'd0) rdata = '0;
    else rdata = gpr[addr[4:0]];
  end
endmodule
