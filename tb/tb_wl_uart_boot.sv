// tb_wl_uart_boot: workload test of the boot flow of the full system at its default size
// (32 KB RAM, UART at 868 clocks per bit): a host sends firmware and a microcode update over
// the UART, a bootloader resident in RAM loads both, installs the update and starts the
// firmware.
//
// The testbench plays the host.  Its byte stream, all words little-endian:
//   N_fw, N_fw firmware words (loaded at 0x4000), N_uc, N_uc update entries of 4 words each
//   (ADDR, DATA0, DATA1, DATA2, the layout of the update unit's registers).
// The bootloader (assembled by the testbench into RAM, where the platform keeps it) polls the
// UART status, assembles words, stores the firmware, writes every update entry into the
// update unit's staging registers and pushes it, flushes, and jumps to 0x4000.  The update
// adds an instruction the power-up microcode does not have: ROL rd, rs1, rs2 (rotate left,
// in the R-type slot funct7 = 0110000, funct3 = 001, which decodes as illegal at power-up).
// Its microroutine (9 steps, this design's own) uses scratch register 0:
//   t = rs1 << rs2;  b = 0 - rs2;  b = rs1 >> b;  rd = t | b.
// The firmware computes ROL and SLL on two operands and sends both results back (8 bytes).
//   Phase 1: firmware only, no update: ROL must halt the core as an illegal instruction.
//   Phase 2: firmware and update: the host must receive rol(a, b) and a << b, then ECALL.
//   Phase 3: after another reset, firmware only: the installed microcode survives the reset.
// The testbench counts received bytes, staged entries, core holds and halts, and checks that
// the receiver never overran.
module tb_wl_uart_boot;
  import ucpu_pkg::*;
  import ucode_pkg::*;
  import rv_asm_pkg::*;

  localparam int DIV = 868;
  logic clk = 0, rst_n = 1, uart_rx = 1, uart_tx;
  logic [15:0] led;
  logic halted;
  logic [3:0] halt_cause;
  int checks = 0, failures = 0;

  ucode_soc dut (.clk, .rst_n, .uart_rx, .uart_tx, .led, .halted, .halt_cause);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---- the added instruction ----------------------------------------------------------------
  localparam int R   = int'(UA_FREE);
  localparam int R_N = 9;
  function automatic uinstr_t rol_word(int i);
    case (i)
      0: return mv(SRC_RF, EN_A, RFS_RS1);
      1: return mv(SRC_RF, EN_B, RFS_RS2);
      2: return with_scr(with_alu(mv(SRC_ALU, EN_RF), ALU_SLL), 2'd0);
      3: return with_k(mv(SRC_CONST, EN_A), 32'd0);
      4: return with_alu(mv(SRC_ALU, EN_B), ALU_SUB);
      5: return mv(SRC_RF, EN_A, RFS_RS1);
      6: return with_alu(mv(SRC_ALU, EN_B), ALU_SRL);
      7: return with_scr(mv(SRC_RF, EN_A), 2'd0);
      default: return with_seq(with_alu(mv(SRC_ALU, EN_RF, RFS_RD), ALU_OR), SEQ_FETCH);
    endcase
  endfunction
  function automatic logic [31:0] ROL(int rd, int a, int b);
    return enc_r(7'h30, 5'(b), 5'(a), 3'd1, 5'(rd), 7'h33);
  endfunction

  // ---- monitors -------------------------------------------------------------------------------
  int n_push, n_hold, n_ucw, n_dtw, n_rxpop, n_ovr;
  logic [7:0] rx_host [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.s_ucu && dut.req.we && dut.req.addr[7:0] == 8'h10) n_push++;
      if (dut.hold_ack) n_hold++;
      if (dut.uc_we) n_ucw++;
      if (dut.dt_we) n_dtw++;
      if (dut.s_uart && dut.req.re && dut.req.addr[7:0] == 8'h00) n_rxpop++;
      if (dut.u_uart.rx_ovr) n_ovr++;
    end
  end

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_tx);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = uart_tx;
      end
      repeat (DIV) @(posedge clk);
      if (uart_tx) rx_host.push_back(b);
    end
  end

  task automatic send_byte(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask

  task automatic send_word(logic [31:0] w);
    for (int i = 0; i < 4; i++) send_byte(w[8*i +: 8]);
  endtask

  // ---- bootloader (resident in RAM) and firmware image -----------------------------------------
  localparam int FW = 32'h4000, FW_N = 34, GETW = 32'h100;
  logic [31:0] fw [FW_N];
  logic [31:0] op_a, op_b;
  int p;
  task automatic put(logic [31:0] w); dut.u_ram.mem[p] = w; p++; endtask

  task automatic build_bootloader();
    int lp, done, gb;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = 32'h0000_0013;
    p = 0;
    put(LUI(20, UART_BASE));
    put(LUI(18, UCU_BASE)); put(ADDI(18, 18, int'(UCU_BASE[11:0])));
    put(JAL(1, GETW - p * 4)); put(ADDI(5, 10, 0));          // firmware word count
    put(LUI(6, FW));
    lp = p; done = p + 6;
    put(BEQ(5, 0, (done - p) * 4));
    put(JAL(1, GETW - p * 4)); put(SW(10, 6, 0));
    put(ADDI(6, 6, 4)); put(ADDI(5, 5, -1)); put(JAL(0, (lp - p) * 4));
    put(JAL(1, GETW - p * 4)); put(ADDI(5, 10, 0));          // update entry count
    lp = p; done = p + 12;
    put(BEQ(5, 0, (done - p) * 4));
    put(JAL(1, GETW - p * 4)); put(SW(10, 18, 0));
    put(JAL(1, GETW - p * 4)); put(SW(10, 18, 4));
    put(JAL(1, GETW - p * 4)); put(SW(10, 18, 8));
    put(JAL(1, GETW - p * 4)); put(SW(10, 18, 12));
    put(SW(0, 18, 16)); put(ADDI(5, 5, -1)); put(JAL(0, (lp - p) * 4));
    put(SW(0, 18, 20));                                      // flush
    put(LUI(6, FW)); put(JALR(0, 6, 0));
    // getw: x10 <- next four received bytes, little-endian
    p = GETW / 4;
    put(ADDI(10, 0, 0)); put(ADDI(13, 0, 0)); put(ADDI(14, 0, 32));
    gb = p;
    put(LW(11, 20, 4)); put(ANDI(11, 11, 2)); put(BEQ(11, 0, -8));
    put(LW(11, 20, 0)); put(SLL(11, 11, 13)); put(OR(10, 10, 11));
    put(ADDI(13, 13, 8)); put(BNE(13, 14, (gb - p) * 4));
    put(JALR(0, 1, 0));
  endtask

  task automatic build_firmware();
    for (int i = 0; i < FW_N; i++) fw[i] = 32'h0000_0013;
    op_a = $urandom;
    op_b = 32'($urandom_range(1, 31));
    fw[0] = LUI(20, UART_BASE);  fw[1] = LUI(7, FW);
    fw[2] = LW(6, 7, 32'h80);    fw[3] = LW(8, 7, 32'h84);
    fw[4] = ROL(9, 6, 8);        fw[5] = JAL(1, 32'h40 - 5 * 4);
    fw[6] = SLL(9, 6, 8);        fw[7] = JAL(1, 32'h40 - 7 * 4);
    fw[8] = ECALL();
    // send x9, 4 bytes (at 0x40 = word 16)
    fw[16] = ADDI(12, 0, 4);
    fw[17] = LW(11, 20, 4);      fw[18] = ANDI(11, 11, 1);     fw[19] = BNE(11, 0, -8);
    fw[20] = SW(9, 20, 0);       fw[21] = SRLI(9, 9, 8);       fw[22] = ADDI(12, 12, -1);
    fw[23] = BNE(12, 0, (17 - 23) * 4);
    fw[24] = JALR(0, 1, 0);
    fw[32'h80 / 4] = op_a;
    fw[32'h84 / 4] = op_b;
  endtask

  task automatic host_send(logic with_update);
    logic [95:0] d;
    send_word(FW_N);
    for (int i = 0; i < FW_N; i++) send_word(fw[i]);
    send_word(with_update ? R_N + 1 : 0);
    if (with_update) begin
      for (int i = 0; i < R_N; i++) begin
        d = 96'(rol_word(i));
        send_word(32'(R + i)); send_word(d[31:0]); send_word(d[63:32]); send_word(d[95:64]);
      end
      send_word({1'b1, 22'd0, OPC_OP, 3'b001, 1'b1});
      send_word(32'(R)); send_word(0); send_word(0);
    end
  endtask

  task automatic run_phase(logic with_update);
    rx_host.delete();
    @(negedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    host_send(with_update);
    fork
      wait (halted);
      begin repeat (200000) @(posedge clk); end
    join_any
    disable fork;
    repeat (12 * DIV) @(posedge clk);
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rol_exp, got_rol, got_sll;
    #1 rst_n = 0;
    build_bootloader();
    build_firmware();
    rol_exp = (op_a << op_b) | (op_a >> (32 - op_b));
    // ---- phase 1: no update: the new encoding is illegal ------------------------------------
    run_phase(1'b0);
    chk(halted && halt_cause == HALT_ILLEGAL, $sformatf("phase 1: halted illegal (cause %0d)", halt_cause));
    chk(rx_host.size() == 0, "phase 1: nothing sent back");
    chk(dut.u_ram.mem[FW / 4 + 4] == ROL(9, 6, 8), "phase 1: firmware loaded over the UART");
    // ---- phase 2: firmware and update -----------------------------------------------------------
    run_phase(1'b1);
    chk(halted && halt_cause == HALT_ECALL, "phase 2: firmware reached ECALL");
    chk(rx_host.size() == 8, $sformatf("phase 2: host received %0d bytes", rx_host.size()));
    if (rx_host.size() == 8) begin
      got_rol = {rx_host[3], rx_host[2], rx_host[1], rx_host[0]};
      got_sll = {rx_host[7], rx_host[6], rx_host[5], rx_host[4]};
      chk(got_rol == rol_exp, $sformatf("phase 2: rol(%h, %0d) = %h, expected %h", op_a, op_b, got_rol, rol_exp));
      chk(got_sll == op_a << op_b, "phase 2: SLL unaffected by the added instruction");
    end
    chk(n_ucw == R_N && n_dtw == 1, "phase 2: update written");
    // ---- phase 3: reset, firmware only: the update is still installed -------------------------
    run_phase(1'b0);
    chk(halted && halt_cause == HALT_ECALL, "phase 3: firmware reached ECALL");
    chk(rx_host.size() == 8 && {rx_host[3], rx_host[2], rx_host[1], rx_host[0]} == rol_exp,
        "phase 3: added instruction survives reset");
    $display("mechanisms: uart_rx_bytes=%0d push=%0d hold=%0d ucode_wr=%0d dtab_wr=%0d overrun_cycles=%0d",
             n_rxpop, n_push, n_hold, n_ucw, n_dtw, n_ovr);
    chk(n_rxpop == 3 * (8 + 4 * FW_N) + 16 * (R_N + 1), "every host byte read by the bootloader");
    chk(n_push == R_N + 1 && n_hold > 0, "update staged and core held");
    chk(n_ovr == 0, "receiver never overran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
