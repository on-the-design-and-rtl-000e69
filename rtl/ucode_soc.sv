// ucode_soc: the complete embedded system around the microcoded RV32I core.
//
// The core, a 32 KB RAM, a UART to the workstation, a cycle timer, an LED port and the
// microcode update unit share one memory-mapped bus (soc_bus), as in the document's setup
// figure.  All memory and peripherals are on chip.  Firmware runs from RAM starting at
// address 0; a write sequence to the update unit followed by a flush replaces microcode
// words and dispatch entries while the system runs.  halted/halt_cause report that the core
// executed ECALL (1), EBREAK (2) or an illegal instruction (3).
// The interrupt controller shown in the setup figure is not included: its function is not
// described.
module ucode_soc
  import ucpu_pkg::*;
#(
  parameter int unsigned RAM_BYTES = 32768,
  parameter int unsigned CLK_DIV   = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rx,
  output logic        uart_tx,
  output logic [15:0] led,
  output logic        halted,
  output logic [3:0]  halt_cause
);
  bus_req_t         req;
  logic [31:0]      rdata, rd_ram, rd_uart, rd_tim, rd_led, rd_ucu, pc;
  logic             s_ram, s_uart, s_tim, s_led, s_ucu;
  logic             hold_req, hold_ack, uc_we, dt_we, ucu_busy;
  uaddr_t           uc_waddr, dt_wdata;
  uinstr_t          uc_wdata;
  logic [KEY_W-1:0] dt_waddr;

  ucode_cpu #(.RESET_PC(RAM_BASE)) u_cpu (
    .clk, .rst_n, .bus_req(req), .bus_rdata(rdata), .hold_req, .hold_ack,
    .uc_we, .uc_waddr, .uc_wdata, .dt_we, .dt_waddr, .dt_wdata,
    .halted, .halt_cause, .pc_o(pc)
  );

  soc_bus #(.RAM_BYTES(RAM_BYTES)) u_bus (
    .req, .rdata, .sel_ram(s_ram), .sel_uart(s_uart), .sel_tim(s_tim), .sel_led(s_led),
    .sel_ucu(s_ucu), .rdata_ram(rd_ram), .rdata_uart(rd_uart), .rdata_tim(rd_tim),
    .rdata_led(rd_led), .rdata_ucu(rd_ucu)
  );

  sys_ram #(.BYTES(RAM_BYTES)) u_ram (.clk, .sel(s_ram), .req, .rdata(rd_ram));

  uart #(.CLK_DIV(CLK_DIV)) u_uart (
    .clk, .rst_n, .sel(s_uart), .req, .rdata(rd_uart), .rx(uart_rx), .tx(uart_tx)
  );

  timer u_tim (.clk, .rst_n, .sel(s_tim), .req, .rdata(rd_tim));

  led_port #(.N_LED(16)) u_led (.clk, .rst_n, .sel(s_led), .req, .rdata(rd_led), .led);

  ucode_update #(.DEPTH(128)) u_ucu (
    .clk, .rst_n, .sel(s_ucu), .req, .rdata(rd_ucu), .hold_req, .hold_ack,
    .uc_we, .uc_waddr, .uc_wdata, .dt_we, .dt_waddr, .dt_wdata, .busy(ucu_busy)
  );
endmodule
