// ram_iface: byte-lane handling between the 32-bit bus and the word-organised memory.
//
// Combinational.  For a store it replicates the byte or halfword from the internal bus over
// the word and sets the byte enables from the low address bits; for a load it shifts the
// addressed byte or halfword of the read word down and zero- or sign-extends it.  Misaligned
// halfword and word accesses are not supported (RV32I allows a core to trap on them; this
// core simply uses the aligned word).
module ram_iface
  import ucpu_pkg::*;
(
  input  logic [1:0]  addr_lo,
  input  msize_e      size,
  input  logic        uns,
  input  logic [31:0] st_data,
  output logic [31:0] wdata,
  output logic [3:0]  be,
  input  logic [31:0] rdata,
  output logic [31:0] ld_data
);
  logic [31:0] sh;
  always_comb begin
    unique case (size)
      MSZ_B: begin
        wdata = {4{st_data[7:0]}};
        be    = 4'b0001 << addr_lo;
      end
      MSZ_H: begin
        wdata = {2{st_data[15:0]}};
        be    = addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata = st_data;
        be    = 4'b1111;
      end
    endcase
    sh = rdata >> {addr_lo, 3'b000};
    unique case (size)
      MSZ_B:   ld_data = uns ? {24'd0, sh[7:0]}  : {{24{sh[7]}}, sh[7:0]};
      MSZ_H:   ld_data = uns ? {16'd0, sh[15:0]} : {{16{sh[15]}}, sh[15:0]};
      default: ld_data = rdata;
    endcase
  end
endmodule
