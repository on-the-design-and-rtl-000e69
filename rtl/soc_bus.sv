// soc_bus: the memory/peripheral bus of the system.
//
// The core is the only master.  The bus decodes the request address into one select line
// per slave (RAM, UART, timer, LED port, microcode update unit) and returns the read data of
// the addressed slave.  Every slave registers its read data one cycle after the address, and
// the core keeps the address stable while it waits, so the read-data multiplexer can be
// steered by the current address.  Unmapped addresses read as zero and ignore writes.
// Memory map (this design's choice): RAM from 0; peripherals at 0x1000_0000, 256 bytes each.
module soc_bus
  import ucpu_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 32768
) (
  input  bus_req_t    req,
  output logic [31:0] rdata,
  output logic        sel_ram,
  output logic        sel_uart,
  output logic        sel_tim,
  output logic        sel_led,
  output logic        sel_ucu,
  input  logic [31:0] rdata_ram,
  input  logic [31:0] rdata_uart,
  input  logic [31:0] rdata_tim,
  input  logic [31:0] rdata_led,
  input  logic [31:0] rdata_ucu
);
  always_comb begin
    sel_ram  = (req.addr < RAM_BASE + RAM_BYTES);
    sel_uart = (req.addr[31:8] == UART_BASE[31:8]);
    sel_tim  = (req.addr[31:8] == TIM_BASE[31:8]);
    sel_led  = (req.addr[31:8] == LED_BASE[31:8]);
    sel_ucu  = (req.addr[31:8] == UCU_BASE[31:8]);
    if (sel_ram)       rdata = rdata_ram;
    else if (sel_uart) rdata = rdata_uart;
    else if (sel_tim)  rdata = rdata_tim;
    else if (sel_led)  rdata = rdata_led;
    else if (sel_ucu)  rdata = rdata_ucu;
    else               rdata = '0;
  end
endmodule
