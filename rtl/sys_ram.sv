// sys_ram: on-chip RAM of the system (32 KB in the document), holding bootloader, firmware
// and data for the von Neumann core.
//
// Word organised, one port.  Reads are synchronous: rdata shows the word at req.addr one
// cycle after the address is presented.  A write (sel && req.we) stores the bytes whose
// enable bits are set.  Contents are not initialised; a loader (or a testbench) fills them.
module sys_ram
  import ucpu_pkg::*;
#(
  parameter int unsigned BYTES = 32768
) (
  input  logic        clk,
  input  logic        sel,
  input  bus_req_t    req,
  output logic [31:0] rdata
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (sel && req.we) begin
      for (int i = 0; i < 4; i++) if (req.be[i]) mem[widx][8*i +: 8] <= req.wdata[8*i +: 8];
    end
    rdata <= mem[widx];
  end
endmodule
