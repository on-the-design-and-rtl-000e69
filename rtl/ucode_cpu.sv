// ucode_cpu: microcoded, multi-cycle RV32I core with a single internal bus.
//
// Control unit: the microcode store (ucode_rom, whose output register is the uIR), the
// sequencer (useq) and the dispatch table (instr_dec).  Datapath: the registers IR, A, B, PC
// and DADDR, the register file with four scratch registers, the ALU, the comparator, the
// immediate generator and the RAM interface.  In each cycle exactly one source drives the
// bus (the datapath multiplexer, selected by the microinstruction) and every register whose
// enable bit is set takes the bus value; the ALU always works on A and B (or the constant
// field) and its result is one of the bus sources.  This follows the architecture figure of
// the document; the field encodings are this design's own.
//
// Memory: the address is always DADDR.  Reads are synchronous, so microcode writes DADDR,
// waits one step and then takes SRC_RAM; a store step drives the bus value to memory.
// Instruction fetch is the microroutine at address 0 (4 cycles); it leaves PC pointing at the
// next instruction, as the document's branch microcode expects.
//
// The update port (uc_*, dt_*) writes the microcode store and dispatch table; hold_req /
// hold_ack stop the core at an instruction boundary while that happens.
module ucode_cpu
  import ucpu_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic             clk,
  input  logic             rst_n,
  output bus_req_t         bus_req,
  input  logic [31:0]      bus_rdata,
  input  logic             hold_req,
  output logic             hold_ack,
  input  logic             uc_we,
  input  uaddr_t           uc_waddr,
  input  uinstr_t          uc_wdata,
  input  logic             dt_we,
  input  logic [KEY_W-1:0] dt_waddr,
  input  uaddr_t           dt_wdata,
  output logic             halted,
  output logic [3:0]       halt_cause,
  output logic [31:0]      pc_o
);
  uinstr_t     uir;
  uaddr_t      upc, upc_next, disp_addr;
  logic        exec, cond_true;
  logic [31:0] ir_q, a_q, b_q, pc_q, daddr_q;
  logic [31:0] bus, alu_y, alu_l, alu_r, imm, rf_rdata, ld_data, st_wdata;
  logic [3:0]  st_be;
  logic [5:0]  rf_addr;
  en_t         en;

  ucode_rom #(.DEPTH(1 << UADDR_W)) u_rom (
    .clk, .rd_addr(upc_next), .rd_data(uir), .we(uc_we), .waddr(uc_waddr), .wdata(uc_wdata)
  );

  instr_dec u_dec (
    .clk, .ir(ir_q), .start(disp_addr), .we(dt_we), .waddr(dt_waddr), .wdata(dt_wdata)
  );

  useq u_seq (
    .clk, .rst_n, .uir, .cond_true, .disp_addr, .hold_req, .hold_ack, .upc, .upc_next,
    .exec, .halted, .halt_cause
  );

  ucode_cmp u_cmp (.cond(uir.cond), .a(a_q), .b(b_q), .taken(cond_true));

  assign alu_l = uir.alu_a_b ? b_q : a_q;
  assign alu_r = uir.alu_b_k ? uir.konst : b_q;
  ucode_alu u_alu (.op(uir.alu_op), .a(alu_l), .b(alu_r), .y(alu_y));

  imm_gen u_imm (.ir(ir_q), .fmt(uir.imm), .imm);

  always_comb begin
    unique case (uir.rfsel)
      RFS_RS1: rf_addr = {1'b0, ir_q[19:15]};
      RFS_RS2: rf_addr = {1'b0, ir_q[24:20]};
      RFS_RD:  rf_addr = {1'b0, ir_q[11:7]};
      RFS_SCR: rf_addr = {4'b1000, uir.scr};
      default: rf_addr = 6'd0;
    endcase
  end

  assign en = exec ? uir.en : EN_NONE;

  regfile #(.N_SCRATCH(4)) u_rf (
    .clk, .rst_n, .addr(rf_addr), .we(en.rf), .wdata(bus), .rdata(rf_rdata)
  );

  ram_iface u_rif (
    .addr_lo(daddr_q[1:0]), .size(uir.msize), .uns(uir.munsigned), .st_data(bus),
    .wdata(st_wdata), .be(st_be), .rdata(bus_rdata), .ld_data
  );

  // Datapath multiplexer: the single internal bus.
  always_comb begin
    unique case (uir.src)
      SRC_RF:    bus = rf_rdata;
      SRC_RAM:   bus = ld_data;
      SRC_PC:    bus = pc_q;
      SRC_ALU:   bus = alu_y;
      SRC_IMM:   bus = imm;
      SRC_CONST: bus = uir.konst;
      default:   bus = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_q    <= '0;
      a_q     <= '0;
      b_q     <= '0;
      pc_q    <= RESET_PC;
      daddr_q <= '0;
    end else begin
      if (en.ir)    ir_q    <= bus;
      if (en.a)     a_q     <= bus;
      if (en.b)     b_q     <= bus;
      if (en.pc)    pc_q    <= bus;
      if (en.daddr) daddr_q <= bus;
    end
  end

  assign bus_req.addr  = daddr_q;
  assign bus_req.wdata = st_wdata;
  assign bus_req.be    = st_be;
  assign bus_req.we    = en.ram;
  assign bus_req.re    = exec && (uir.src == SRC_RAM);
  assign pc_o          = pc_q;
endmodule
