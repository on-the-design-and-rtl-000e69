// tb_wl_aes_ttest: fixed-versus-random leakage test of the XOR timing-leak microcode, on the
// full system at its default size.
//
// This is the evaluation method of the timing Trojan at a smaller scale: encryptions of one
// fixed plaintext and of random plaintexts, randomly interleaved, are timed with the cycle
// timer, and Welch's t statistic of the two classes of times is computed, once with the
// power-up microcode and once after the byte-by-byte XOR routine has been installed.  A |t|
// above 4.5 counts as leakage.  Without the replacement XOR every encryption must take the
// same time (t = 0); with it, t must exceed 4.5.
//
// The cipher is a stand-in, not AES (no compiled AES is available to this testbench): a
// 128-bit state in four words goes through 8 rounds, each adding four round-key words with XOR
// (state word as rs1, key word as rs2) and then mixing the words with ADDs.  That gives 32
// key XORs per encryption, each of which leaks how many low-order bytes of state and key agree.
// 1000 encryptions per run stand in for the 10000 + 10000 of the original evaluation.
//
// The testbench recomputes the cipher state and, from the operands of each XOR, the exact
// extra cycles of the replacement routine (5 + 4m for m < 4 matching bytes, 18 for m = 4), and
// checks every single measured time and ciphertext word against that model.
//
// A third phase recovers the first round key from timing alone, one byte at a time, as the
// key-retrieval step of the evaluation does.  For byte j of key word w, every candidate value
// g is placed in byte j of plaintext word w (lower bytes set to the key bytes already found,
// everything else random), and the times of many such encryptions are summed per candidate.
// The right candidate makes one more byte of that XOR match, which costs 4 cycles more per
// encryption (1 cycle for the top byte: 18 instead of 17), so the largest sum marks it.  Bytes
// 0-2 use 16 encryptions per candidate, byte 3 uses 64.  All 16 recovered bytes must equal
// the key.  Runs are batches of 1024 encryptions, each started by a reset; the firmware
// reads the batch size from RAM.
module tb_wl_aes_ttest;
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

  localparam int NTOT = 1000, NMAX = 1024, ROUNDS = 8;
  localparam int KEY = 32'h400, NENT = 32'h7F0, NCNT = 32'h7F8, PT = 32'h1000, OUT = 32'h5000, TABLE = 32'h7000;

  int n_ucw, n_xt;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.uc_we) n_ucw++;
      if (dut.u_cpu.exec && dut.u_cpu.upc == 10'(XT)) n_xt++;
    end
  end

  int p, nent;
  logic [31:0] key [ROUNDS][4];
  logic [31:0] pt [NMAX][4];
  logic        is_fixed [NTOT];
  int          t_meas [NMAX];
  int          base, bad_t, bad_ct;
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

  // the first entry points XOR back at the power-up routine (an earlier update survives reset)
  task automatic put_update(logic trojan);
    nent = 0;
    put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(UA_OP + 15));
    if (trojan) begin
      for (int i = 0; i < XT_LEN; i++) put_entry(1'b0, XT + i, 96'(xt_word(i)));
      put_entry(1'b1, {OPC_OP, 3'b100, 1'b0}, 96'(XT));
    end
    ram_w(NENT, nent);
  endtask

  task automatic build_firmware();
    int loop_top;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = 32'h0000_0013;
    for (int r = 0; r < ROUNDS; r++)
      for (int w = 0; w < 4; w++) ram_w(KEY + 16 * r + 4 * w, key[r][w]);
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
    // x10 plaintext pointer, x13 output pointer, x14 round keys, x9 encryptions left
    put(LUI(10, PT)); put(LUI(13, OUT)); put(ADDI(14, 0, KEY)); put(LW(9, 0, NCNT));
    loop_top = p;
    put(LW(24, 20, 32'h100));
    put(LW(5, 10, 0)); put(LW(6, 10, 4)); put(LW(7, 10, 8)); put(LW(28, 10, 12));
    for (int r = 0; r < ROUNDS; r++) begin
      put(LW(29, 14, 16 * r));      put(XOR(5, 5, 29));
      put(LW(29, 14, 16 * r + 4));  put(XOR(6, 6, 29));
      put(LW(29, 14, 16 * r + 8));  put(XOR(7, 7, 29));
      put(LW(29, 14, 16 * r + 12)); put(XOR(28, 28, 29));
      put(ADD(5, 5, 6)); put(ADD(6, 6, 7)); put(ADD(7, 7, 28)); put(ADD(28, 28, 5));
    end
    put(LW(25, 20, 32'h100));
    put(SUB(25, 25, 24)); put(SW(25, 13, 0)); put(SW(28, 13, 4));
    put(ADDI(10, 10, 16)); put(ADDI(13, 13, 8)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, (loop_top - p) * 4));
    put(ECALL());
  endtask

  // run n encryptions of pt[0..n-1]; times to t_meas, mismatches against the model counted
  task automatic run_batch(logic trojan, int n);
    logic [31:0] ct;
    int extra;
    for (int e = 0; e < n; e++)
      for (int w = 0; w < 4; w++) ram_w(PT + 16 * e + 4 * w, pt[e][w]);
    ram_w(NCNT, n);
    put_update(trojan);
    @(negedge clk) rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      wait (halted);
      begin repeat (3000000) @(posedge clk); end
    join_any
    disable fork;
    chk(halted && halt_cause == HALT_ECALL, "batch reached ECALL");
    for (int e = 0; e < n; e++) begin
      t_meas[e] = int'(ram_r(OUT + 8 * e));
      model(e, ct, extra);
      if (base == 0) base = t_meas[0];
      if (ram_r(OUT + 8 * e + 4) != ct) bad_ct++;
      if (t_meas[e] != base + (trojan ? extra : 0)) bad_t++;
    end
  endtask

  function automatic int xt_extra(logic [31:0] a, logic [31:0] b);
    int m;
    m = 0;
    while (m < 4 && a[8*m +: 8] == b[8*m +: 8]) m++;
    return (m < 4) ? 5 + 4 * m : 18;
  endfunction

  // model of one encryption: last state word and the extra cycles of the replacement XOR
  task automatic model(int e, output logic [31:0] ct, output int extra);
    logic [31:0] s [4];
    extra = 0;
    for (int w = 0; w < 4; w++) s[w] = pt[e][w];
    for (int r = 0; r < ROUNDS; r++) begin
      for (int w = 0; w < 4; w++) begin
        extra += xt_extra(s[w], key[r][w]);
        s[w] = s[w] ^ key[r][w];
      end
      s[0] = s[0] + s[1]; s[1] = s[1] + s[2]; s[2] = s[2] + s[3]; s[3] = s[3] + s[0];
    end
    ct = s[3];
  endtask

  // Welch's t of fixed against random class; 0 when both classes are constant and equal
  function automatic real welch_t();
    real sf, sr, qf, qr, mf, mr, vf, vr, d;
    int nf, nr;
    sf = 0; sr = 0; qf = 0; qr = 0; nf = 0; nr = 0;
    for (int e = 0; e < NTOT; e++)
      if (is_fixed[e]) begin nf++; sf += t_meas[e]; end
      else begin nr++; sr += t_meas[e]; end
    mf = sf / nf; mr = sr / nr;
    for (int e = 0; e < NTOT; e++)
      if (is_fixed[e]) qf += (t_meas[e] - mf) ** 2;
      else qr += (t_meas[e] - mr) ** 2;
    vf = qf / (nf - 1); vr = qr / (nr - 1);
    d = vf / nf + vr / nr;
    if (d == 0.0) return 0.0;
    return (mf - mr) / $sqrt(d);
  endfunction

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] fixed_pt [4];
    logic [31:0] found [4];
    longint sum [256];
    int nfix, nbatch, best;
    real t [2];
    #1 rst_n = 0;
    for (int r = 0; r < ROUNDS; r++)
      for (int w = 0; w < 4; w++) key[r][w] = $urandom;
    for (int w = 0; w < 4; w++) fixed_pt[w] = $urandom;
    nfix = 0;
    for (int e = 0; e < NTOT; e++) begin
      is_fixed[e] = 1'($urandom);
      nfix += int'(is_fixed[e]);
      for (int w = 0; w < 4; w++) pt[e][w] = is_fixed[e] ? fixed_pt[w] : $urandom;
    end
    build_firmware();
    base = 0;
    for (int run = 0; run < 2; run++) begin
      bad_t = 0; bad_ct = 0;
      run_batch(run == 1, NTOT);
      t[run] = welch_t();
      $display("run %0d (%s): %0d fixed + %0d random encryptions, t = %0.2f", run,
               (run == 1) ? "timing Trojan" : "power-up XOR", nfix, NTOT - nfix, t[run]);
      chk(bad_ct == 0, $sformatf("run %0d: %0d ciphertexts differ from the model", run, bad_ct));
      chk(bad_t == 0, $sformatf("run %0d: %0d encryption times differ from the model", run, bad_t));
    end
    // key retrieval
    bad_t = 0; bad_ct = 0; nbatch = 0;
    for (int w = 0; w < 4; w++) begin
      found[w] = '0;
      for (int j = 0; j < 4; j++) begin
        for (int g = 0; g < 256; g++) sum[g] = 0;
        for (int b = 0; b < ((j == 3) ? 16 : 4); b++) begin
          for (int e = 0; e < NMAX; e++) begin
            for (int v = 0; v < 4; v++) pt[e][v] = $urandom;
            for (int i = 0; i < j; i++) pt[e][w][8*i +: 8] = found[w][8*i +: 8];
            pt[e][w][8*j +: 8] = 8'(e);
          end
          run_batch(1'b1, NMAX);
          nbatch++;
          for (int e = 0; e < NMAX; e++) sum[e % 256] += longint'(t_meas[e]);
        end
        best = 0;
        for (int g = 1; g < 256; g++) if (sum[g] > sum[best]) best = g;
        found[w][8*j +: 8] = 8'(best);
      end
      $display("key word %0d: recovered %h, actual %h", w, found[w], key[0][w]);
      chk(found[w] == key[0][w], $sformatf("key word %0d recovered from timing", w));
    end
    chk(bad_ct == 0 && bad_t == 0, $sformatf("key retrieval: %0d times, %0d ciphertexts off the model",
                                             bad_t, bad_ct));
    chk(base == 4 * 9 + ROUNDS * (4 * 9 + 4 * 7 + 4 * 7) + 9,
        $sformatf("power-up encryption takes %0d cycles", base));
    chk(t[0] == 0.0, "no leakage with the power-up XOR");
    chk(t[1] > 4.5 || t[1] < -4.5, $sformatf("leakage with the timing Trojan (|t| = %0.2f)", t[1]));
    chk(n_ucw == XT_LEN * (1 + nbatch) && n_xt == (NTOT + nbatch * NMAX) * ROUNDS * 4, $sformatf("update installed (%0d words) and replacement XOR run %0d times",
                                                            n_ucw, n_xt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
