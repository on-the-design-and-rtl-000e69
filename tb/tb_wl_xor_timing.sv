// tb_wl_xor_timing: workload test of the XOR timing-leak microcode on the full system at its
// default size.
//
// The firmware measures the execution time of one XOR instruction with the cycle timer, for
// five operand pairs whose leading low-order bytes agree in 0, 1, 2, 3 and 4 byte positions.
// It measures once with the power-up microcode, then installs a replacement XOR microroutine
// through the microcode update unit (staging registers + flush), and measures again.
//
// The replacement XOR (this design's own microcode, written from the byte-by-byte idea of the
// timing Trojan) still writes rs1 ^ rs2 to rd, then checks the result byte by byte, starting
// at the lowest byte: while a byte of the result is zero (the operands agree in that byte) it
// spends one extra NOP step and goes on to the next byte; at the first differing byte it
// fetches.  A byte is isolated by shifting the saved result left so that only bytes 0..k stay,
// and comparing with the zero register x0.  Step counts of the new routine:
//   5 steps (operands, result to rd, result to scratch 0, B <- x0)
//   + per checked byte k: 3 steps (A <- scratch 0, A <- A << (24 - 8k), compare) + 1 NOP if
//     the byte matched; the NOP of byte 3 also fetches.
// So with m matching bytes the routine takes 8 + 4m steps (m < 4) or 21 (m = 4), against 3
// for the power-up XOR: the measured time must grow by 5, 9, 13, 17 and 18 cycles.  The XOR
// result itself must not change.  The testbench counts update writes and payload NOPs and
// counts a failure for a mechanism that never happened.
module tb_wl_xor_timing;
  import ucpu_pkg::*;
  import ucode_pkg::*;
  import rv_asm_pkg::*;
  import trojan_ucode_pkg::*;

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

  // ---- mechanism counters ---------------------------------------------------------------
  int n_push, n_ucw, n_dtw, n_hold, n_nop, n_xt;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.s_ucu && dut.req.we && dut.req.addr[7:0] == 8'h10) n_push++;
      if (dut.uc_we) n_ucw++;
      if (dut.dt_we) n_dtw++;
      if (dut.hold_ack) n_hold++;
      if (dut.u_cpu.exec && dut.u_cpu.upc == 10'(XT)) n_xt++;
      if (dut.u_cpu.exec && int'(dut.u_cpu.upc) >= XT_BYTE && (int'(dut.u_cpu.upc) - XT_BYTE) % 4 == 3)
        n_nop++;
    end
  end

  // ---- firmware ---------------------------------------------------------------------------
  localparam int NENT = 32'h5F0, TABLE = 32'h400, PAIRS = 32'h600, R0 = 32'h680, R1 = 32'h700,
                 MEAS = 32'h100;
  int p, nent;
  logic [31:0] opa [5], opb [5];
  task automatic put(logic [31:0] w); dut.u_ram.mem[p] = w; p++; endtask
  task automatic ram_w(int addr, logic [31:0] w); dut.u_ram.mem[addr / 4] = w; endtask
  function automatic logic [31:0] ram_r(int addr); return dut.u_ram.mem[addr / 4]; endfunction

  task automatic put_entry(logic dtab, int addr, logic [95:0] data);
    ram_w(TABLE + 16 * nent, {dtab, 21'd0, 10'(addr)});
    ram_w(TABLE + 16 * nent + 4, data[31:0]);
    ram_w(TABLE + 16 * nent + 8, data[63:32]);
    ram_w(TABLE + 16 * nent + 12, data[95:64]);
    nent++;
  endtask

  task automatic build_firmware();
    int loop_top;
    logic [31:0] mask;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = 32'h0000_0013;
    nent = 0;
    for (int i = 0; i < XT_LEN; i++) put_entry(1'b0, XT + i, 96'(xt_word(i)));
    put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(XT));
    ram_w(NENT, nent);
    // operand pairs: pair m agrees in bytes 0..m-1 and differs in byte m
    for (int m = 0; m < 5; m++) begin
      opa[m] = $urandom;
      mask = (m < 4) ? (32'(1 + $urandom_range(0, 254)) << (8 * m)) : 32'h0;
      if (m < 3) mask |= 32'($urandom) << (8 * (m + 1));
      opb[m] = opa[m] ^ mask;
      ram_w(PAIRS + 8 * m, opa[m]);
      ram_w(PAIRS + 8 * m + 4, opb[m]);
    end
    // main: measure, update the XOR microcode, measure again, stop
    p = 0;
    put(LUI(20, UART_BASE));
    put(ADDI(23, 0, R0)); put(JAL(1, MEAS - p * 4));
    put(LUI(18, UCU_BASE)); put(ADDI(18, 18, int'(UCU_BASE[11:0])));
    put(ADDI(8, 0, TABLE)); put(LW(9, 0, NENT));
    loop_top = p;
    put(LW(5, 8, 0));  put(SW(5, 18, 0));  put(LW(5, 8, 4));  put(SW(5, 18, 4));
    put(LW(5, 8, 8));  put(SW(5, 18, 8));  put(LW(5, 8, 12)); put(SW(5, 18, 12));
    put(SW(0, 18, 16)); put(ADDI(8, 8, 16)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, (loop_top - p) * 4));
    put(SW(0, 18, 20));
    put(ADDI(23, 0, R1)); put(JAL(1, MEAS - p * 4));
    put(ECALL());
    // measurement routine: for each pair, time one XOR between two timer reads
    p = MEAS / 4;
    put(ADDI(21, 0, PAIRS)); put(ADDI(22, 0, 5));
    loop_top = p;
    put(LW(6, 21, 0)); put(LW(7, 21, 4));
    put(LW(24, 20, 32'h100)); put(XOR(8, 6, 7)); put(LW(25, 20, 32'h100));
    put(SUB(25, 25, 24)); put(SW(25, 23, 0)); put(SW(8, 23, 4));
    put(ADDI(21, 21, 8)); put(ADDI(23, 23, 8)); put(ADDI(22, 22, -1));
    put(BNE(22, 0, (loop_top - p) * 4));
    put(JALR(0, 1, 0));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d0, d1;
    build_firmware();
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      wait (halted);
      begin repeat (100000) @(posedge clk); end
    join_any
    disable fork;
    chk(halted && halt_cause == HALT_ECALL, "firmware reached ECALL");
    for (int m = 0; m < 5; m++) begin
      d0 = int'(ram_r(R0 + 8 * m));
      d1 = int'(ram_r(R1 + 8 * m));
      $display("pair %0d: %h ^ %h  before %0d cycles, after %0d cycles", m, opa[m], opb[m], d0, d1);
      chk(ram_r(R0 + 8 * m + 4) == (opa[m] ^ opb[m]), $sformatf("pair %0d: XOR result before update", m));
      chk(ram_r(R1 + 8 * m + 4) == (opa[m] ^ opb[m]), $sformatf("pair %0d: XOR result after update", m));
      chk(d1 - d0 == ((m < 4) ? 5 + 4 * m : 18),
          $sformatf("pair %0d: %0d extra cycles, expected %0d", m, d1 - d0, (m < 4) ? 5 + 4 * m : 18));
      if (m > 0) chk(int'(ram_r(R0 + 8 * m)) == int'(ram_r(R0)), "power-up XOR time is data independent");
    end
    $display("mechanisms: push=%0d hold=%0d ucode_wr=%0d dtab_wr=%0d trojan_xor=%0d payload_nop=%0d",
             n_push, n_hold, n_ucw, n_dtw, n_xt, n_nop);
    chk(n_push == nent && n_ucw == XT_LEN && n_dtw == 1, "update staged and copied");
    chk(n_hold > 0, "core held during the copy");
    chk(n_xt == 5, "replacement XOR executed for every pair");
    chk(n_nop == 0 + 1 + 2 + 3 + 4, $sformatf("%0d payload NOPs, expected 10", n_nop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
