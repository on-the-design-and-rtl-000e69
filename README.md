# A microcoded RV32I embedded system with in-field microcode updates

This design is a small RISC-V (RV32I) computer whose processor is **microcoded**. Every
architectural instruction is carried out by a short program of *microinstructions* read from
an on-chip control store. Both the control store and the table that maps instructions to
their microprograms are writable at run time, through a memory-mapped *microcode update
unit*. Software can therefore change what any instruction does without touching the
hardware.

The system exists to study that capability: how it is used, by booting over the UART and
adding an instruction in the field, and how it can be abused. Three test programs replace
instruction semantics through the update path, each one a "microcode Trojan":

- a BEQ that ignores a failed signature check at one fixed address (secure-boot bypass);
- an XOR whose run time leaks how many low-order operand bytes are equal (timing leak);
- a stateful LW/XOR pair that, for one magic plaintext, makes a cipher output its last round
  key (fault injection).

All of it is synthesizable SystemVerilog, simulated with Verilator.

```
            +---------------------------- ucode_soc ---------------------------------+
 uart_rx -->|  +-----------+   bus_req_t   +---------+--> sys_ram   (32 KB)           |
 uart_tx <--|  | ucode_cpu |-------------->| soc_bus |--> uart      (8N1)             |
 led    <---|  |           |<--------------|         |--> timer     (64-bit cycles)   |
 halted <---|  |           |   rdata       |         |--> led_port  (16 bits)         |
            |  |           |<-- hold ------|         |--> ucode_update ---+           |
            |  |           |<-- ucode/dispatch writes ------------------- +           |
            |  +-----------+                                                          |
            +-------------------------------------------------------------------------+
```

## 1. The core: a single-bus datapath driven by horizontal microcode

### 1.1 Datapath

`ucode_cpu` has one internal 32-bit bus. In each clock cycle exactly one *source* drives it:

| source (`src_e`) | value on the bus                                             |
|------------------|--------------------------------------------------------------|
| `SRC_RF`         | register-file read port (x0..x31 or one of 4 scratch registers) |
| `SRC_RAM`        | load data from the bus interface, aligned and sign/zero-extended |
| `SRC_PC`         | program counter                                              |
| `SRC_ALU`        | ALU result                                                   |
| `SRC_IMM`        | immediate extracted from IR (I, S, B, U or J format)         |
| `SRC_CONST`      | 32-bit constant carried in the microinstruction              |

Any set of *destinations* can take the bus value in that cycle, each with its own enable:

- IR, the instruction register;
- A and B, the two ALU and comparator operand registers;
- PC;
- the register file;
- DADDR, the memory address register, which drives the system-bus address;
- the RAM write port, which stores the bus value at DADDR.

The ALU's left operand is A, or B when `alu_a_b` is set. Its right operand is B, or the
microinstruction constant when `alu_b_k` is set. A comparator looks at A and B all the time
and produces the condition the sequencer tests.

This style makes every instruction cost several cycles, because each data transfer takes its
own cycle. In return the control logic is trivial, and the meaning of each instruction lives
entirely in the control store.

The register file (`regfile`) has one port, since only one transfer happens per cycle. It
addresses 32 architectural registers and 4 scratch registers. Microcode can use the scratch
registers freely, and software cannot see them. x0 always reads as zero. The scratch
registers are cleared by reset; the architectural registers are not.

### 1.2 The microinstruction (`uinstr_t`, 101 bits)

The encoding is horizontal: each field drives one group of control signals directly, with no
decoding in between.

| field        | bits | meaning |
|--------------|------|---------|
| `halt`       | 1    | stop the core; `konst[3:0]` is the cause |
| `src`        | 3    | bus source |
| `rfsel`      | 3    | register-file address: rs1, rs2 or rd field of IR, x0, or scratch |
| `scr`        | 2    | scratch register index when `rfsel = RFS_SCR` |
| `en`         | 7    | destination enables: ir, a, b, pc, rf, daddr, ram |
| `alu_op`     | 4    | ADD SUB SLL SLT SLTU XOR SRL SRA OR AND |
| `alu_a_b`    | 1    | ALU left operand is B instead of A |
| `alu_b_k`    | 1    | ALU right operand is `konst` instead of B |
| `imm`        | 3    | immediate format for `SRC_IMM` |
| `msize`, `munsigned` | 2+1 | byte/half/word, and zero- or sign-extension for loads and stores |
| `cond`       | 3    | condition on A,B: always, ==, !=, <, >=, <u, >=u |
| `seq`        | 2    | next-address mode (below) |
| `target`     | 10   | jump target in the control store |
| `konst`      | 32   | constant |

### 1.3 Sequencing (`useq`)

The next microaddress is chosen in one of four ways:

| `seq`       | next address |
|-------------|--------------|
| `SEQ_INC`   | uPC + 1 |
| `SEQ_JUMP`  | `target` if `cond` holds, else uPC + 1 |
| `SEQ_FETCH` | 0 (the fetch routine) if `cond` holds, else uPC + 1 |
| `SEQ_DISP`  | the dispatch-table entry for the instruction now in IR |

A conditional *fetch* gives an early exit from a routine. A branch that is not taken uses it
to end three steps early.

**Timing of the control store.** The control store (`ucode_rom`) is read synchronously. Its
address is the *next* microaddress, and its output register is the microinstruction register
(uIR). The microinstruction in uIR therefore always belongs to the current uPC. It takes
effect in the same cycle, and the register writes it orders happen at the next clock edge.
When a step writes A or B, a comparison in the following step already sees the new value.

**Dispatch** (`instr_dec`) uses a 512-entry writable table. It is indexed by
`{ir[6:2], ir[14:12], ir[30]}` (opcode, funct3, funct7 bit 5) and gives the start address of
the instruction's microroutine. The read is combinational, so the dispatch step and the first
step of the routine are back to back. Unused keys point to a routine that halts with cause 3
(illegal instruction). The design does not reject R-type encodings whose other funct7 bits
are non-zero.

**Halting.** A microinstruction with `halt` set stops the sequencer and latches a cause:
1 for ECALL, 2 for EBREAK, 3 for an illegal instruction. The halt is sticky until reset. No
trap or interrupt architecture exists: the core simply stops and shows `halted` and
`halt_cause` on the top-level pins.

### 1.4 The power-up microprogram

The power-up content of the control store and the dispatch table is computed by the
functions `urom_word(addr)` and `dtab_word(key)` in `ucode_pkg`. It is not loaded from a
file. Each microstep is one call to small constructor functions (`mv`, `with_alu`, `with_k`,
`with_imm`, `with_mem`, `with_seq`, `with_scr`). Here is an R-type instruction written that
way:

```
a  <- rf[rs1]
b  <- rf[rs2]
rd <- alu(a op b);  fetch
```

The **fetch routine** sits at microaddress 0 and takes 4 cycles:
`daddr <- pc`, then `a <- pc`, then `ir <- ram`, then `pc <- a + 4` with dispatch. The second
step fills the cycle in which memory is still reading: it copies PC into A, because the ALU
takes its operands only from A and B (or the constant). When a routine starts, PC already
points to the *next* instruction. This is why the branch, JAL and AUIPC routines subtract 4
to recover the instruction's own address.

| instruction group | microaddress | steps | total cycles incl. fetch |
|-------------------|--------------|-------|--------------------------|
| fetch             | 0            | 4     | – |
| illegal (halt 3)  | 4            | 1     | halts |
| ECALL / EBREAK    | 8            | 3–4   | halts (cause 1 / 2) |
| R-type (10)       | 16 + 3i      | 3     | 7 |
| I-type ALU (9)    | 48 + 3i      | 3     | 7 |
| LUI               | 80           | 1     | 5 |
| AUIPC             | 84           | 4     | 8 |
| JAL               | 88           | 5     | 9 |
| JALR              | 96           | 6     | 10 |
| BEQ..BGEU (6)     | 104 + 6i     | 3 / 6 | 7 not taken / 10 taken |
| LB LH LW LBU LHU  | 144 + 5i     | 5     | 9 |
| SB SH SW          | 176 + 4i     | 4     | 8 |
| FENCE (no-op)     | 192          | 1     | 5 |
| free for updates  | 256..1023    | –     | – |

Loads spend one step doing nothing, because data memory answers one cycle after DADDR is
written. Words 193..1023 of the store hold the illegal-instruction halt until an update
overwrites them.

## 2. Changing instructions in the field: the update unit

`ucode_update` is a bus slave at `0x1000_0300`. Software *stages* entries into an internal
buffer (128 entries). It then *flushes* them: the unit holds the core and copies every staged
entry into the control store or the dispatch table, one per clock.

| offset | register | access |
|--------|----------|--------|
| 0x00   | ADDR     | bits 9:0 = target address; bit 31 = 1 selects the dispatch table (address = key) |
| 0x04   | DATA0    | microinstruction bits 31:0 (for the dispatch table: the start address) |
| 0x08   | DATA1    | microinstruction bits 63:32 |
| 0x0C   | DATA2    | microinstruction bits 100:64 |
| 0x10   | PUSH     | any write appends {ADDR, DATA2..0} to the buffer |
| 0x14   | FLUSH    | any write starts the copy |
| 0x18   | STATUS   | [15:0] staged count, [30] an entry was dropped (buffer full), [31] busy |

The flush handshake works like this:

1. The unit raises `hold_req`.
2. The core finishes the instruction it is in. The instruction that wrote FLUSH is a store,
   and it completes.
3. The core parks at microaddress 0 and answers `hold_ack`.
4. The unit copies the entries, one per clock, then drops `hold_req`.
5. The core fetches the next instruction, which already runs with the new microcode.

Because the core stops only at an instruction boundary, no instruction ever runs half old and
half new microcode. An assertion in `ucode_update` checks that nothing is written while the
core is not held.

Writes to the control store and dispatch table are not reset. An installed update survives a
reset of the core and disappears only at power-up, when the initial content is loaded again.

A typical update routine in software looks like this:

```
for each entry:  sw addr,0x00(ucu); sw d0,0x04(ucu); sw d1,0x08(ucu); sw d2,0x0C(ucu); sw x0,0x10(ucu)
sw x0,0x14(ucu)       # flush; execution continues with the new semantics
```

To *add* an instruction or *replace* one, write its new routine into free words (256 and up),
then point its dispatch key(s) there. For loads and I-type instructions, `ir[30]` is part of
the immediate, so both keys with that bit 0 and 1 must be written.

## 3. The system around the core

| base          | block      | registers |
|---------------|------------|-----------|
| `0x0000_0000` | `sys_ram`  | 32 KB, byte-enable writes, one-cycle read latency; code and data; execution starts at 0 |
| `0x1000_0000` | `uart`     | +0 write: send byte; read: received byte (reading pops it). +4 status: [0] tx busy, [1] rx valid, [2] overrun |
| `0x1000_0100` | `timer`    | +0 low word, +4 high word of a 64-bit clock-cycle counter; a write to +0 clears it |
| `0x1000_0200` | `led_port` | 16-bit read/write output register with byte enables |
| `0x1000_0300` | `ucode_update` | see section 2 |

`soc_bus` decodes the address combinationally. It returns the read data of the slave that was
addressed in the previous cycle, so every slave has the same one-cycle read latency. The core
has no wait states and never stalls on the bus.

The UART sends and receives 8 data bits, no parity, 1 stop bit. Its bit time is
`CLK_DIV = 868` clocks, which is 115200 baud at 100 MHz. The receiver samples in mid-bit and
holds one byte.

Parameters and their defaults:

- `ucode_soc`: `RAM_BYTES = 32768`, `CLK_DIV = 868`.
- `ucode_rom`: `DEPTH = 1024`.
- `ucode_update`: `DEPTH = 128`.
- `regfile`: `N_SCRATCH = 4`.
- `led_port`: `N_LED = 16`.

The top, `ucode_soc`, has these ports: `clk`, `rst_n` (asynchronous, active low), `uart_rx`,
`uart_tx`, `led[15:0]`, `halted`, `halt_cause[3:0]`.

## 4. The three microcode Trojans as test programs

Each scenario is a testbench that builds firmware in RAM, with a small RV32I encoder package
(`tb/rv_asm_pkg.sv`). The firmware installs the malicious microcode through the update unit
exactly as legitimate software would. Every testbench runs the full system at its default
parameters.

**Secure-boot bypass (`tb_ucode_soc`).** The firmware imitates a verified-boot loader:

- at 0x230 it calls `verify()`;
- at 0x238 a `beq` branches to an endless loop at 0x240 when verification returned 0;
- at 0x23c it jumps to the payload at 0x7000.

The replacement BEQ microcode builds the constant 0x23c from 4-bit constants with shifts and
ORs. It compares that constant with PC only when the operands are equal, so BEQs that are not
taken cost nothing extra. When PC is 0x23c, it does not branch.

The test runs in two phases:

1. Without the update, the loader hangs at 0x240.
2. With the update, the payload runs (LED = 0x7E, then ECALL) although `verify()` still
   fails. Other BEQs behave normally.

The same test also exercises the LED port, the timer, the UART in both directions and every
sequencing mode. It counts each mechanism and fails if one never happens.

**XOR timing leak (`tb_wl_xor_timing`).** The replacement XOR still writes the correct
result. After that it examines the result from the lowest byte upward. For each zero byte
(equal operand bytes) it spends one extra NOP step. At the first non-zero byte it fetches.

Measured with the timer, the XOR takes 5, 9, 13, 17 and 18 extra cycles when 0, 1, 2, 3 or
all 4 low-order bytes of the operands agree. Software that XORs secret data with
attacker-chosen data, as AES key addition does, now leaks through its run time one byte at a
time.

`tb_wl_aes_ttest` checks the leak the way a side-channel evaluator would, using a
fixed-versus-random test. The cipher is a stand-in, not AES. It has 8 rounds, and each round
XORs four round-key words into a 4-word state and then mixes the words with ADDs. The test
times 1000 encryptions, with a fixed plaintext and random plaintexts randomly interleaved.
From those times it computes Welch's t statistic between the two classes. With the power-up
XOR every encryption takes the same 781 cycles, so t = 0. With the replacement XOR, |t| is
well above the usual 4.5 threshold (between 7 and 8.5 over the seeds tried). The testbench
also predicts every single encryption time from the XOR operands and checks it exactly.

The same testbench then recovers the first round key from timing alone. To find byte j of key
word w, it tries each of the 256 candidate values in byte j of plaintext word w. The lower
bytes are set to the key bytes already found, and everything else is random. The times are
summed per candidate over many encryptions, and the largest sum wins. The right candidate
makes one more byte of the XOR match. That costs 4 more cycles per encryption for bytes 0 to
2, but only 1 more for the top byte (18 cycles instead of 17). So bytes 0 to 2 use 16
encryptions per candidate, and the top byte uses 64. That is about 115,000 encryptions for
all 16 bytes.

**Key leak by fault injection (`tb_wl_aes_fault`).** Replacement LW and XOR routines share a
12-state machine kept in scratch register 3:

| states | instruction | what happens |
|--------|-------------|--------------|
| 0–3    | every LW    | compares the loaded word with 0x0000dead; a match advances the state, anything else returns to 0 |
| 4–7    | every LW    | compares its immediate with 0xA0, 0xA4, 0xA8, 0xAC in turn; a match advances the state, any other LW returns to 4 |
| 8–11   | every XOR   | writes its first operand unchanged (the round key) instead of the XOR; advances the state, and state 11 returns to 0 |

In states 0–3 the LW pattern is the plaintext being loaded. In states 4–7 it is the last
round key being loaded. Outside states 8–11, XOR works normally.

The cost is visible: LW takes 19 more cycles in the idle state, and XOR takes 3 more. The test
checks both numbers.

The cipher in this test is a stand-in, not a full AES. It loads the plaintext and mixes in one
earlier round-key word. It then does the last key addition in the instruction pattern the
trigger expects. Three runs are checked:

- a plaintext that matches only three of the magic words: normal output;
- the magic plaintext: output equals the last round key;
- an ordinary plaintext afterwards: normal output again, and the state machine is back in
  state 0.

**What the Trojans cost (`tb_wl_crc32_overhead`).** A table-driven CRC-32 over 128 bytes is
timed with the cycle timer in four microcode configurations: power-up, and each of the three
Trojans. Per byte the loop costs 77 cycles with the power-up microcode. It contains two XORs,
one LW and one taken BNE.

| configuration | overhead | why |
|---------------|----------|-----|
| secure-boot BEQ | 0.00 % | no BEQ in the loop |
| timing-leak XOR | about 13 % | +5 cycles per XOR when the low bytes differ, more when they match |
| key-leak LW + XOR | about 33 % | +19 per LW and +3 per XOR |

The test predicts every one of these cycle counts exactly, including the data-dependent XOR
cost, and checks that the CRC stays correct. Each update first points the affected dispatch
keys back at the power-up routines, because earlier updates survive the reset between runs.

**Boot over the UART and adding an instruction (`tb_wl_uart_boot`).** This test shows the
intended, benign use of the same path. A host model sends a byte stream over the UART, with
all words little-endian:

1. the firmware word count, then the firmware words;
2. the update entry count, then each entry as four words (ADDR, DATA0, DATA1, DATA2).

A bootloader resident in RAM polls the UART and stores the firmware at 0x4000. It writes each
entry into the update unit and pushes it, then flushes and jumps to the firmware.

The update *adds* an instruction that the power-up microcode lacks:
`ROL rd, rs1, rs2` (rotate left, funct7 = 0110000, funct3 = 001). It takes 9 microsteps and
uses a scratch register for the left-shifted half.

The test runs in three phases:

1. Without the update, the firmware's ROL halts the core as illegal.
2. With the update, the host receives the correct rotate and an unaffected SLL result.
3. After another reset, with no update sent, ROL still works, because the control store is
   not reset.

## 5. Where this design makes its own choices

The structure follows the published description of such a processor: a single bus; the
registers IR, A, B, PC and DADDR; a register file with four scratch registers; a comparator
feeding the microsequencer; horizontal microcode; the four sequencing modes; PC pointing past
the fetched instruction; a dispatch table in memory; and staging followed by flush for
updates. So do the platform (32 KB RAM, UART, cycle timer, LEDs) and the behaviour and cycle
costs of the Trojans.

The following are this design's own choices:

- **Microinstruction encoding.** Field set, widths and the 32-bit constant field. The ALU can
  take B as left operand and a constant as right operand.
- **The whole power-up microprogram.** The fetch routine, and every instruction routine except
  the general shape of ADD and BEQ.
- **The control store.** Its size (1024 words), and reading it with the next address so that
  its output register serves as the uIR.
- **Dispatch.** The dispatch key and the table size (512 entries).
- **The update unit.** Buffer depth (128), the register map, holding the core at an instruction
  boundary, and copying one entry per clock.
- **Memory map and bus.** The memory map, the bus protocol and the one-cycle read latency of
  every slave.
- **Peripherals.** UART framing, bit rate and registers; timer width and registers; LED
  width.
- **Reset and exceptions.** The reset PC is 0. ECALL, EBREAK and illegal instructions halt the
  core.
- **The Trojan microroutines.** They are written for this datapath. The timing-leak XOR is
  cheaper than a byte-mask implementation would be, because the constant field and the zero
  register make the masks easy.

Not present:

- **Interrupts.** The interrupt controller of the reference platform is not built, because
  its behaviour is unspecified.
- **Misaligned loads and stores.**
- **CSRs, privilege modes and traps.**
- **A microcode compiler.** It is replaced by the SystemVerilog constructor functions.
- **A fixed host-side update protocol.** The hardware only provides the update registers. The
  UART byte format used by the example bootloader in `tb_wl_uart_boot` is just one possible
  software convention.

## 6. Files and simulation

`rtl/`:

- `ucpu_pkg` holds the types and the memory map.
- `ucode_pkg` holds the microcode constructors and the power-up microprogram.
- Core: `ucode_cpu`, built from `useq`, `ucode_rom`, `instr_dec`, `ucode_alu`, `ucode_cmp`,
  `imm_gen`, `regfile` and `ram_iface`.
- System: `sys_ram`, `soc_bus`, `uart`, `timer`, `led_port`, `ucode_update`, and the top
  `ucode_soc`.

`tb/` holds one self-checking testbench per module (`tb_<module>`), the workload testbenches
`tb_wl_*`, `rv_asm_pkg` (an RV32I instruction encoder) and `trojan_ucode_pkg` (the Trojan
microroutines of section 4). Each testbench prints
`TB_RESULT checks=N failures=M`.

Run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ucpu_pkg.sv rtl/ucode_pkg.sv tb/rv_asm_pkg.sv tb/trojan_ucode_pkg.sv \
    tb/tb_ucode_soc.sv \
    --top-module tb_ucode_soc -o sim
obj_dir/sim
```

Replace `tb_ucode_soc` with any other testbench name. The end-to-end and workload tests run
at full size, in a few seconds each.

Two notes on simulation:

- The testbenches start with reset released, then assert it, so that the asynchronous reset
  sees an edge.
- The memory contents of `sys_ram` are written directly by the testbenches; the hardware does
  not initialise RAM.
