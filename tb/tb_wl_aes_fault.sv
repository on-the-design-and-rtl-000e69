// tb_wl_aes_fault: workload test of the stateful key-leak microcode (the AES fault Trojan) on
// the full system at its default size.
//
// A replacement LW and a replacement XOR microroutine are installed through the microcode
// update unit.  They share a 12-state machine kept in scratch register t4 (index 3), which a
// reset clears:
//   states 0-3   every LW compares the loaded word with the magic word 0x0000dead; a match
//                moves to the next state, anything else returns to state 0.
//   states 4-7   every LW compares its immediate offset with 0xA0, 0xA4, 0xA8, 0xAC (one per
//                state); a match moves on, any other LW returns to state 4.
//   states 8-11  XOR ignores its second operand and writes rs1 to rd (the last round key
//                instead of the ciphertext); it advances the state, and state 11 returns to 0.
// Outside the payload states XOR behaves normally.  The magic constant is assembled in
// microcode from 4-bit constants with shifts and ORs, so a non-matching LW in state 0 costs
// 3 + 15 + 1 = 19 extra steps; XOR outside the payload states costs 3 extra steps.  Both
// numbers are checked with the cycle timer, measured before and after the update.
//
// The encryption itself is a stand-in, not a full AES: it loads the four plaintext words,
// mixes one of them with a round-key word loaded from another offset (as the earlier rounds
// would), then performs the last key addition exactly in the instruction pattern the trigger
// looks for (four LWs of the round key at offsets 0xA0..0xAC of the key pointer, then four
// XORs with the key word as first operand).  Three runs: a plaintext that matches only three
// magic words, the magic plaintext, and an ordinary plaintext afterwards.  Only the magic
// plaintext may produce the last round key as ciphertext, and the state machine must have
// passed all 12 states and be back in state 0.
module tb_wl_aes_fault;
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

  // ---- monitors -------------------------------------------------------------------------------
  int n_push, n_ucw, n_dtw, n_hold, n_pay, n_rst4;
  logic [11:0] seen;
  logic [31:0] t4_prev;
  int t4_trace [$];
  always @(posedge clk) begin
    if (!rst_n) begin
      seen <= 12'b1;
      t4_prev <= '0;
    end else begin
      if (dut.s_ucu && dut.req.we && dut.req.addr[7:0] == 8'h10) n_push++;
      if (dut.uc_we) n_ucw++;
      if (dut.dt_we) n_dtw++;
      if (dut.hold_ack) n_hold++;
      if (dut.u_cpu.exec && dut.u_cpu.upc == 10'(AF_X_PAY)) n_pay++;
      if (dut.u_cpu.exec && dut.u_cpu.upc == 10'(AF_L_RST4)) n_rst4++;
      if (dut.u_cpu.u_rf.scr[T4] != t4_prev) begin
        t4_prev <= dut.u_cpu.u_rf.scr[T4];
        t4_trace.push_back(int'(dut.u_cpu.u_rf.scr[T4]));
        if (dut.u_cpu.u_rf.scr[T4] < 12) seen[dut.u_cpu.u_rf.scr[T4][3:0]] <= 1'b1;
      end
    end
  end

  // ---- firmware -------------------------------------------------------------------------------
  localparam int TABLE = 32'h1000, NENT = 32'h07F0, KEY = 32'h0400, DATAW = 32'h07F4,
                 PT_A = 32'h0600, PT_M = 32'h0610, PT_B = 32'h0620,
                 CT_A = 32'h0640, CT_M = 32'h0650, CT_B = 32'h0660,
                 R_T0 = 32'h0680, R_T1 = 32'h0690, TIMING = 32'h100, ENC = 32'h180;
  int p, nent;
  logic [31:0] pt [3][4];
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

  function automatic logic [31:0] rnd_word();
    logic [31:0] w;
    do w = $urandom; while (w == {16'd0, MAGIC});
    return w;
  endfunction

  task automatic build_firmware();
    int loop_top;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = 32'h0000_0013;
    nent = 0;
    for (int a = AF_L; a < AF_L + AF_L_LEN; a++) put_entry(1'b0, a, 96'(af_lw_word(a)));
    for (int a = AF_X; a < AF_X + AF_X_LEN; a++) put_entry(1'b0, a, 96'(af_xor_word(a)));
    put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b0}, 96'(AF_L));
    put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b1}, 96'(AF_L));
    put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(AF_X));
    ram_w(NENT, nent);
    for (int i = 0; i < 64; i++) ram_w(KEY + 4 * i, rnd_word());
    ram_w(DATAW, rnd_word());
    for (int w = 0; w < 4; w++) begin
      pt[0][w] = (w < 3) ? {16'd0, MAGIC} : rnd_word();
      pt[1][w] = {16'd0, MAGIC};
      pt[2][w] = rnd_word();
      ram_w(PT_A + 4 * w, pt[0][w]);
      ram_w(PT_M + 4 * w, pt[1][w]);
      ram_w(PT_B + 4 * w, pt[2][w]);
    end
    // main
    p = 0;
    put(LUI(20, UART_BASE));
    put(ADDI(23, 0, R_T0)); put(JAL(1, TIMING - p * 4));
    put(LUI(18, UCU_BASE)); put(ADDI(18, 18, int'(UCU_BASE[11:0])));
    put(LUI(8, TABLE)); put(ADDI(8, 8, TABLE & 32'hFFF)); put(LW(9, 0, NENT));
    loop_top = p;
    put(LW(5, 8, 0));  put(SW(5, 18, 0));  put(LW(5, 8, 4));  put(SW(5, 18, 4));
    put(LW(5, 8, 8));  put(SW(5, 18, 8));  put(LW(5, 8, 12)); put(SW(5, 18, 12));
    put(SW(0, 18, 16)); put(ADDI(8, 8, 16)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, (loop_top - p) * 4));
    put(SW(0, 18, 20));
    put(ADDI(23, 0, R_T1)); put(JAL(1, TIMING - p * 4));
    put(ADDI(11, 0, KEY));
    put(ADDI(10, 0, PT_A)); put(ADDI(12, 0, CT_A)); put(JAL(1, ENC - p * 4));
    put(ADDI(10, 0, PT_M)); put(ADDI(12, 0, CT_M)); put(JAL(1, ENC - p * 4));
    put(ADDI(10, 0, PT_B)); put(ADDI(12, 0, CT_B)); put(JAL(1, ENC - p * 4));
    put(ECALL());
    // timing: two back-to-back timer reads, then one LW, then one XOR between timer reads
    p = TIMING / 4;
    put(LW(24, 20, 32'h100)); put(LW(25, 20, 32'h100)); put(SUB(25, 25, 24)); put(SW(25, 23, 0));
    put(LW(24, 20, 32'h100)); put(LW(6, 0, DATAW)); put(LW(25, 20, 32'h100));
    put(SUB(25, 25, 24)); put(SW(25, 23, 4));
    put(LW(24, 20, 32'h100)); put(XOR(7, 6, 24)); put(LW(25, 20, 32'h100));
    put(SUB(25, 25, 24)); put(SW(25, 23, 8));
    put(JALR(0, 1, 0));
    // stand-in encryption: x10 plaintext, x11 round keys, x12 ciphertext
    p = ENC / 4;
    put(LW(5, 10, 0)); put(LW(6, 10, 4)); put(LW(7, 10, 8)); put(LW(28, 10, 12));
    put(LW(29, 11, 16)); put(XOR(5, 29, 5));
    put(LW(29, 11, 32'hA0)); put(LW(30, 11, 32'hA4)); put(LW(31, 11, 32'hA8)); put(LW(9, 11, 32'hAC));
    put(XOR(5, 29, 5)); put(XOR(6, 30, 6)); put(XOR(7, 31, 7)); put(XOR(28, 9, 28));
    put(SW(5, 12, 0)); put(SW(6, 12, 4)); put(SW(7, 12, 8)); put(SW(28, 12, 12));
    put(JALR(0, 1, 0));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ct_addr [3];
    logic [31:0] st, exp_ct;
    int lw0, lw1, x0, x1;
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
    // timing
    lw0 = int'(ram_r(R_T0 + 4)) - int'(ram_r(R_T0));
    lw1 = int'(ram_r(R_T1 + 4)) - int'(ram_r(R_T1));
    x0  = int'(ram_r(R_T0 + 8)) - int'(ram_r(R_T0));
    x1  = int'(ram_r(R_T1 + 8)) - int'(ram_r(R_T1));
    $display("LW %0d -> %0d cycles, XOR %0d -> %0d cycles", lw0, lw1, x0, x1);
    chk(lw0 == 9 && x0 == 7, "power-up LW 9 cycles, XOR 7 cycles");
    chk(lw1 - lw0 == 19, $sformatf("LW overhead %0d cycles, expected 19", lw1 - lw0));
    chk(x1 - x0 == 3, $sformatf("XOR overhead %0d cycles, expected 3", x1 - x0));
    // ciphertexts
    ct_addr = '{CT_A, CT_M, CT_B};
    for (int r = 0; r < 3; r++)
      for (int w = 0; w < 4; w++) begin
        st = pt[r][w];
        if (w == 0) st ^= ram_r(KEY + 16);
        exp_ct = (r == 1) ? ram_r(KEY + 32'hA0 + 4 * w) : st ^ ram_r(KEY + 32'hA0 + 4 * w);
        chk(ram_r(ct_addr[r] + 4 * w) == exp_ct,
            $sformatf("run %0d word %0d: %h, expected %h", r, w, ram_r(ct_addr[r] + 4 * w), exp_ct));
      end
    $write("t4 trace:");
    foreach (t4_trace[i]) $write(" %0d", t4_trace[i]);
    $display("");
    $display("mechanisms: push=%0d hold=%0d ucode_wr=%0d dtab_wr=%0d payload=%0d stage2_reset=%0d states_seen=%b",
             n_push, n_hold, n_ucw, n_dtw, n_pay, n_rst4, seen);
    chk(n_push == nent && n_ucw == AF_L_LEN + AF_X_LEN && n_dtw == 3, "update staged and copied");
    chk(n_hold > 0, "core held during the copy");
    chk(seen == 12'hFFF, "all 12 trojan states visited");
    chk(n_pay == 4, $sformatf("payload ran %0d times, expected 4", n_pay));
    chk(n_rst4 >= 1, "instruction-sequence stage reset by an unrelated LW");
    chk(dut.u_cpu.u_rf.scr[T4] == 0, "state machine back in its reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
