// tb_wl_crc32_overhead: cycle overhead of the three microcode Trojans on a CRC-32 kernel, on
// the full system at its default size.
//
// The firmware computes the standard CRC-32 (reflected polynomial 0xEDB88320, initial value
// and final XOR 0xFFFFFFFF) of 128 random bytes with a 256-word lookup table, and measures
// the loop with the cycle timer.  Per byte the loop runs LBU, XOR, ANDI, SLLI, ADD, LW, SRLI,
// XOR, ADDI, BNE: 77 cycles with the power-up microcode.  The table is generated by the
// testbench from the polynomial (entry i = eight shift/conditional-XOR steps on i).
//
// The run is repeated in four microcode configurations, each installed through the update
// unit after a reset.  Every update first points the BEQ, LW and XOR dispatch keys back at
// the power-up routines, because an earlier update survives the reset:
//   none        power-up behaviour
//   beq         secure-boot BEQ Trojan: no BEQ in the loop, so exactly 0 extra cycles
//   xor timing  two XORs per byte, each 5 + 4m cycles longer (18 for m = 4), m being the
//               number of matching low-order operand bytes; the testbench recomputes m for
//               every XOR from the data
//   aes fault   LW +19 and XOR +3 per byte, plus 19 for the tail of the first timer read
// In every configuration the CRC must be correct: none of these Trojans changes data flow on
// this input.  The measured overheads are printed as percentages next to each other.
module tb_wl_crc32_overhead;
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

  typedef enum int { CFG_NONE, CFG_BEQ, CFG_XOR, CFG_AES } cfg_e;

  localparam int NBYTES = 128;
  localparam int DATA = 32'h600, CRCTAB = 32'h1000, TABLE = 32'h2000, NENT = 32'h7F0,
                 R_CYC = 32'h7F4, R_CRC = 32'h7F8;

  int n_hold, n_ucw;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.hold_ack) n_hold++;
      if (dut.uc_we) n_ucw++;
    end
  end

  int p, nent;
  logic [7:0]  data [NBYTES];
  logic [31:0] tab [256];
  task automatic put(logic [31:0] w); dut.u_ram.mem[p] = w; p++; endtask
  task automatic ram_w(int addr, logic [31:0] w); dut.u_ram.mem[addr / 4] = w; endtask
  function automatic logic [31:0] ram_r(int addr); return dut.u_ram.mem[addr / 4]; endfunction

  task automatic put_entry(logic dtab, int addr, logic [95:0] data_w);
    ram_w(TABLE + 16 * nent, {dtab, 21'd0, 10'(addr)});
    ram_w(TABLE + 16 * nent + 4, data_w[31:0]);
    ram_w(TABLE + 16 * nent + 8, data_w[63:32]);
    ram_w(TABLE + 16 * nent + 12, data_w[95:64]);
    nent++;
  endtask

  task automatic put_update(cfg_e cfg);
    nent = 0;
    put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b0}, 96'(UA_BRANCH));
    put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b1}, 96'(UA_BRANCH));
    put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b0}, 96'(UA_LOAD + 10));
    put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b1}, 96'(UA_LOAD + 10));
    put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(UA_OP + 15));
    case (cfg)
      CFG_BEQ: begin
        for (int i = 0; i < BEQT_LEN; i++) put_entry(1'b0, int'(UA_FREE) + i, 96'(beqt_word(i)));
        put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b0}, 96'(UA_FREE));
        put_entry(1'b1, {OPC_BRANCH, 3'd0, 1'b1}, 96'(UA_FREE));
      end
      CFG_XOR: begin
        for (int i = 0; i < XT_LEN; i++) put_entry(1'b0, XT + i, 96'(xt_word(i)));
        put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(XT));
      end
      CFG_AES: begin
        for (int a = AF_L; a < AF_L + AF_L_LEN; a++) put_entry(1'b0, a, 96'(af_lw_word(a)));
        for (int a = AF_X; a < AF_X + AF_X_LEN; a++) put_entry(1'b0, a, 96'(af_xor_word(a)));
        put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b0}, 96'(AF_L));
        put_entry(1'b1, {OPC_LOAD, 3'b010, 1'b1}, 96'(AF_L));
        put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(AF_X));
      end
      default: ;
    endcase
    ram_w(NENT, nent);
  endtask

  task automatic build_firmware();
    int loop_top;
    for (int i = 0; i < 2048; i++) dut.u_ram.mem[i] = 32'h0000_0013;
    for (int i = 0; i < NBYTES; i += 4)
      ram_w(DATA + i, {data[i + 3], data[i + 2], data[i + 1], data[i]});
    for (int i = 0; i < 256; i++) ram_w(CRCTAB + 4 * i, tab[i]);
    p = 0;
    put(LUI(20, UART_BASE));
    put(LUI(18, UCU_BASE)); put(ADDI(18, 18, int'(UCU_BASE[11:0])));
    put(LUI(8, TABLE)); put(LW(9, 0, NENT));
    loop_top = p;
    put(LW(5, 8, 0));  put(SW(5, 18, 0));  put(LW(5, 8, 4));  put(SW(5, 18, 4));
    put(LW(5, 8, 8));  put(SW(5, 18, 8));  put(LW(5, 8, 12)); put(SW(5, 18, 12));
    put(SW(0, 18, 16)); put(ADDI(8, 8, 16)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, (loop_top - p) * 4));
    put(SW(0, 18, 20));
    // CRC-32 kernel: x10 data pointer, x11 end, x12 table, x5 crc
    put(ADDI(10, 0, DATA)); put(ADDI(11, 10, NBYTES)); put(LUI(12, CRCTAB));
    put(ADDI(5, 0, -1));
    put(LW(24, 20, 32'h100));
    loop_top = p;
    put(LBU(6, 10, 0)); put(XOR(6, 6, 5)); put(ANDI(6, 6, 255)); put(SLLI(6, 6, 2));
    put(ADD(6, 6, 12)); put(LW(6, 6, 0)); put(SRLI(5, 5, 8)); put(XOR(5, 6, 5));
    put(ADDI(10, 10, 1)); put(BNE(10, 11, (loop_top - p) * 4));
    put(LW(25, 20, 32'h100));
    put(XORI(5, 5, -1));
    put(SUB(25, 25, 24)); put(SW(25, 0, R_CYC)); put(SW(5, 0, R_CRC));
    put(ECALL());
  endtask

  // extra cycles of the timing-leak XOR for operands a, b
  function automatic int xt_extra(logic [31:0] a, logic [31:0] b);
    int m;
    m = 0;
    while (m < 4 && a[8*m +: 8] == b[8*m +: 8]) m++;
    return (m < 4) ? 5 + 4 * m : 18;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c, crc, t;
    int cyc [4];
    int exp_xor_extra;
    string names [4];
    names = '{"none", "beq (secure boot)", "xor (timing)", "lw+xor (aes fault)"};
    #1 rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      c = 32'(i);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
      tab[i] = c;
    end
    for (int i = 0; i < NBYTES; i++) data[i] = 8'($urandom);
    // reference CRC and the data-dependent cost of the timing-leak XOR
    crc = '1;
    exp_xor_extra = 0;
    for (int i = 0; i < NBYTES; i++) begin
      exp_xor_extra += xt_extra({24'd0, data[i]}, crc);
      t = tab[(data[i] ^ crc[7:0])];
      exp_xor_extra += xt_extra(t, crc >> 8);
      crc = t ^ (crc >> 8);
    end
    crc = ~crc;
    build_firmware();
    for (int cfg = 0; cfg < 4; cfg++) begin
      put_update(cfg_e'(cfg));
      @(negedge clk) rst_n = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      fork
        wait (halted);
        begin repeat (200000) @(posedge clk); end
      join_any
      disable fork;
      chk(halted && halt_cause == HALT_ECALL, $sformatf("%s: reached ECALL", names[cfg]));
      chk(ram_r(R_CRC) == crc, $sformatf("%s: crc %h, expected %h", names[cfg], ram_r(R_CRC), crc));
      cyc[cfg] = int'(ram_r(R_CYC));
      $display("%-20s %0d cycles, overhead %0d cycles = %0.2f%%", names[cfg], cyc[cfg],
               cyc[cfg] - cyc[0], 100.0 * real'(cyc[cfg] - cyc[0]) / real'(cyc[0]));
    end
    // loop (the last BNE falls through: 3 cycles less) plus the 9-cycle second timer read
    chk(cyc[CFG_NONE] == NBYTES * 77 - 3 + 9, $sformatf("power-up loop %0d cycles, expected %0d",
                                                         cyc[CFG_NONE], NBYTES * 77 - 3 + 9));
    chk(cyc[CFG_BEQ] == cyc[CFG_NONE], "secure-boot Trojan adds nothing to this loop");
    chk(cyc[CFG_XOR] - cyc[CFG_NONE] == exp_xor_extra,
        $sformatf("timing Trojan overhead %0d, expected %0d", cyc[CFG_XOR] - cyc[CFG_NONE], exp_xor_extra));
    chk(cyc[CFG_AES] - cyc[CFG_NONE] == NBYTES * (19 + 3 + 3) + 19,
        $sformatf("fault Trojan overhead %0d, expected %0d", cyc[CFG_AES] - cyc[CFG_NONE], NBYTES * 25 + 19));
    chk(cyc[CFG_XOR] < cyc[CFG_AES], "fault Trojan costs more than the timing Trojan");
    chk(n_hold >= 4 && n_ucw == BEQT_LEN + XT_LEN + AF_L_LEN + AF_X_LEN, "all four updates installed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
