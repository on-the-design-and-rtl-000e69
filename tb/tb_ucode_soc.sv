// tb_ucode_soc: end-to-end test of the whole system at its default size (32 KB RAM, UART
// at 868 clocks per bit), replaying the secure-boot scenario on this platform.
//
// The firmware, assembled by the testbench into RAM, tests the LED port, the timer (it
// measures a loop whose cycle count the testbench knows from the microroutine lengths), the
// UART in both directions and ordinary BEQ behaviour, and then enters a boot check laid out
// like a verified-boot loader: at 0x230 it calls verify(), at 0x238 a BEQ traps the core at
// 0x240 when verification failed, otherwise 0x23c jumps to the firmware at 0x7000.
//   Phase 1: verify() fails, original microcode: the core must end in the trap loop.
//   Phase 2: the firmware first stages a replacement BEQ microroutine (and two dispatch
//            entries) in the update unit and flushes it.  The new BEQ does not branch when
//            PC = 0x23c.  verify() still fails, yet the firmware at 0x7000 must run (LED 0x7E)
//            and reach ECALL, while other BEQs keep their normal behaviour.
// The testbench counts every mechanism of the design (dispatch, conditional fetch and jump,
// update staging, core hold, microcode and dispatch writes, trigger, halt, UART, timer,
// LED) and counts a failure for any that never happened.
module tb_ucode_soc;
  import ucpu_pkg::*;
  import ucode_pkg::*;
  import rv_asm_pkg::*;
  import trojan_ucode_pkg::*;

  localparam int DIV = 868;
  logic clk = 0, rst_n = 1, uart_rx = 1, uart_tx;
  logic [15:0] led;
  logic halted;
  logic [3:0] halt_cause;
  int checks = 0, failures = 0, cyc = 0;

  ucode_soc dut (.clk, .rst_n, .uart_rx, .uart_tx, .led, .halted, .halt_cause);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---- mechanism counters ---------------------------------------------------------------
  int n_disp, n_cfetch, n_cjump, n_push, n_hold, n_ucw, n_dtw, n_trig, n_halt, n_tim, n_led;
  int n_ramw, n_fetch_trap, n_txbytes, n_rxpop;
  logic [7:0] tx_bytes [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_cpu.exec) begin
        if (dut.u_cpu.uir.seq == SEQ_DISP) n_disp++;
        if (dut.u_cpu.uir.seq == SEQ_FETCH && dut.u_cpu.uir.cond != C_ALWAYS && dut.u_cpu.cond_true) n_cfetch++;
        if (dut.u_cpu.uir.seq == SEQ_JUMP && dut.u_cpu.uir.cond != C_ALWAYS && dut.u_cpu.cond_true) n_cjump++;
        if (dut.u_cpu.upc == UA_FREE + BEQT_TRIG && dut.u_cpu.cond_true) n_trig++;
        if (dut.u_cpu.upc == UA_FETCH && dut.u_cpu.pc_o == 32'h240) n_fetch_trap++;
      end
      if (dut.s_ucu && dut.req.we && dut.req.addr[7:0] == 8'h10) n_push++;
      if (dut.hold_ack) n_hold++;
      if (dut.uc_we) n_ucw++;
      if (dut.dt_we) n_dtw++;
      if (dut.s_tim && dut.req.re) n_tim++;
      if (dut.s_led && dut.req.we) n_led++;
      if (dut.s_ram && dut.req.we) n_ramw++;
      if (dut.s_uart && dut.req.re && dut.req.addr[7:0] == 8'h00) n_rxpop++;
    end
  end
  always @(posedge halted) n_halt++;

  // UART monitor on uart_tx
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
      if (uart_tx) begin tx_bytes.push_back(b); n_txbytes++; end
    end
  end

  task automatic uart_send(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask

  // ---- firmware ---------------------------------------------------------------------------
  localparam int FLAG = 32'h700, NENT = 32'h704, VERIFY = 32'h708, R_STAT = 32'h710,
                 R_TIM = 32'h714, R_BEQ = 32'h718, R_RX = 32'h71C, TABLE = 32'h400;
  int p;
  task automatic put(logic [31:0] w); dut.u_ram.mem[p] = w; p++; endtask
  task automatic ram_w(int addr, logic [31:0] w); dut.u_ram.mem[addr / 4] = w; endtask

  int nent;
  task automatic put_entry(logic dtab, int addr, logic [95:0] data);
    ram_w(TABLE + 16 * nent, {dtab, 21'd0, 10'(addr)});
    ram_w(TABLE + 16 * nent + 4, data[31:0]);
    ram_w(TABLE + 16 * nent + 8, data[63:32]);
    ram_w(TABLE + 16 * nent + 12, data[95:64]);
    nent++;
  endtask

  // Replacement BEQ (trojan_ucode_pkg::beqt_word): normal BEQ, except that at PC = 0x23c
  // the branch is never taken.
  task automatic build_trojan_beq();
    for (int i = 0; i < BEQT_LEN; i++) put_entry(1'b0, int'(UA_FREE) + i, 96'(beqt_word(i)));
    put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b0}, 96'(UA_FREE));
    put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b1}, 96'(UA_FREE));
  endtask

  task automatic build_firmware();
    int skip_br, loop_top;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = 32'h0000_0013;   // NOPs
    nent = 0;
    build_trojan_beq();
    ram_w(NENT, nent);
    p = 0;
    put(LW(5, 0, FLAG));
    skip_br = p; put(32'h0);                          // patched below
    // microcode update: copy the table into the update unit, then flush
    put(LUI(18, UCU_BASE)); put(ADDI(18, 18, int'(UCU_BASE[11:0])));
    put(ADDI(8, 0, TABLE)); put(LW(9, 0, NENT));
    loop_top = p;
    put(LW(5, 8, 0));  put(SW(5, 18, 0));  put(LW(5, 8, 4));  put(SW(5, 18, 4));
    put(LW(5, 8, 8));  put(SW(5, 18, 8));  put(LW(5, 8, 12)); put(SW(5, 18, 12));
    put(SW(0, 18, 16)); put(ADDI(8, 8, 16)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, (loop_top - p) * 4));
    put(SW(0, 18, 20));                               // flush
    put(LW(5, 18, 24)); put(SW(5, 0, R_STAT));        // status after flush
    dut.u_ram.mem[skip_br] = BEQ(5, 0, (p - skip_br) * 4);
    // LED, timer, loop of known length
    put(LUI(20, UART_BASE));
    put(ADDI(5, 0, 32'hA5)); put(SW(5, 20, 32'h200));
    put(LW(6, 20, 32'h100));
    put(ADDI(12, 0, 10));
    put(ADDI(13, 13, 5)); put(ADDI(12, 12, -1)); put(BNE(12, 0, -8));
    put(LW(7, 20, 32'h100)); put(SUB(7, 7, 6)); put(SW(7, 0, R_TIM));
    // ordinary BEQ behaviour
    put(ADDI(10, 0, 0));
    put(BEQ(0, 0, 8)); put(ADDI(10, 10, 1));
    put(BEQ(5, 0, 8)); put(ADDI(10, 10, 2));
    put(SW(10, 0, R_BEQ));
    // UART: send 0x55, wait for a received byte and store it
    put(ADDI(5, 0, 32'h55)); put(SW(5, 20, 0));
    put(LW(6, 20, 4)); put(ANDI(6, 6, 2)); put(BEQ(6, 0, -8));
    put(LW(6, 20, 0)); put(SW(6, 0, R_RX));
    put(JAL(0, 32'h230 - p * 4));
    // boot check
    p = 32'h230 / 4;
    put(JAL(1, 32'h280 - 32'h230));
    put(ADDI(15, 10, 0));
    put(BEQ(15, 0, 8));
    put(JAL(1, 32'h7000 - 32'h23c));
    put(JAL(0, 0));
    p = 32'h280 / 4;
    put(LW(10, 0, VERIFY)); put(JALR(0, 1, 0));
    p = 32'h7000 / 4;
    put(ADDI(5, 0, 32'h7E)); put(SW(5, 20, 32'h200)); put(ECALL());
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_firmware();
    ram_w(FLAG, 0);
    ram_w(VERIFY, 0);
    // ---- phase 1: original microcode, verification fails ---------------------------------
    do_reset();
    uart_send(8'h3C);
    fork
      wait (n_fetch_trap >= 5);
      wait (halted);
      begin repeat (200000) @(posedge clk); end
    join_any
    disable fork;
    chk(n_fetch_trap >= 5, "phase 1: core trapped at 0x240");
    chk(!halted, "phase 1: no halt");
    chk(led == 16'hA5, $sformatf("phase 1: LED %h", led));
    chk(dut.u_ram.mem[R_TIM / 4] == 253, $sformatf("phase 1: timed loop %0d cycles, expected 253",
                                                  dut.u_ram.mem[R_TIM / 4]));
    chk(dut.u_ram.mem[R_BEQ / 4] == 2, "phase 1: BEQ results");
    chk(dut.u_ram.mem[R_RX / 4] == 32'h3C, $sformatf("phase 1: received %h", dut.u_ram.mem[R_RX / 4]));
    chk(tx_bytes.size() == 1 && tx_bytes[0] == 8'h55, "phase 1: transmitted 0x55");
    chk(n_ucw == 0 && n_trig == 0, "phase 1: no update");
    // ---- phase 2: malicious microcode update, verification still fails -------------------
    ram_w(FLAG, 1);
    ram_w(R_RX, 0);
    n_fetch_trap = 0;
    do_reset();
    uart_send(8'hC3);
    fork
      wait (halted);
      begin repeat (400000) @(posedge clk); end
    join_any
    disable fork;
    repeat (12 * DIV) @(posedge clk);                 // let the last UART frame finish
    chk(halted && halt_cause == HALT_ECALL, "phase 2: firmware reached ECALL");
    chk(led == 16'h7E, $sformatf("phase 2: LED %h (firmware at 0x7000 ran)", led));
    chk(n_fetch_trap == 0, "phase 2: trap loop never entered");
    chk(n_trig == 1, $sformatf("phase 2: trigger fired %0d times", n_trig));
    chk(n_ucw == BEQT_LEN && n_dtw == 2, $sformatf("phase 2: %0d microcode and %0d dispatch writes", n_ucw, n_dtw));
    chk(n_push == nent, "phase 2: all entries staged");
    chk(dut.u_ram.mem[R_STAT / 4] == 0, $sformatf("phase 2: update status %h", dut.u_ram.mem[R_STAT / 4]));
    chk(dut.u_ram.mem[R_BEQ / 4] == 2, "phase 2: other BEQs unaffected");
    chk(dut.u_ram.mem[R_TIM / 4] == 253, "phase 2: timed loop (no BEQ in it) unchanged");
    chk(dut.u_ram.mem[R_RX / 4] == 32'hC3, "phase 2: received byte");
    chk(tx_bytes.size() == 2 && tx_bytes[1] == 8'h55, "phase 2: transmitted 0x55");
    // ---- every mechanism happened ----------------------------------------------------------
    $display("mechanisms: dispatch=%0d cond_fetch=%0d cond_jump=%0d push=%0d hold=%0d ucode_wr=%0d dtab_wr=%0d trigger=%0d halt=%0d timer_rd=%0d led_wr=%0d ram_wr=%0d uart_tx=%0d uart_rx=%0d",
             n_disp, n_cfetch, n_cjump, n_push, n_hold, n_ucw, n_dtw, n_trig, n_halt, n_tim, n_led,
             n_ramw, n_txbytes, n_rxpop);
    chk(n_disp > 0, "dispatch happened");
    chk(n_cfetch > 0, "conditional fetch happened");
    chk(n_cjump > 0, "conditional jump happened");
    chk(n_push > 0 && n_hold > 0 && n_ucw > 0 && n_dtw > 0, "update mechanism happened");
    chk(n_trig > 0 && n_halt > 0, "trigger and halt happened");
    chk(n_tim > 0 && n_led > 0 && n_ramw > 0 && n_txbytes > 0 && n_rxpop > 0, "peripherals used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
