// useq: the microcode sequencer (uPC, uPC multiplexer and +1 incrementer).
//
// The microinstruction in the uIR (the registered output of the microcode store) names how
// the next microprogram address is chosen: increment, jump to its target field when the
// comparator condition holds, return to the fetch routine when the condition holds
// ("fetch" / "if a != b fetch"), or dispatch to the start address the instruction decoder
// gives for the instruction in IR.  A conditional step whose condition fails falls through
// to uPC + 1.  upc_next drives the read address of the microcode store, so upc and the uIR
// always belong together.
//
// The sequencer freezes (exec = 0, upc held) in three cases: during the first cycle after
// reset while the uIR is loaded, after a microinstruction with its halt bit (ECALL, EBREAK,
// illegal instruction; cleared only by reset), and while the update unit holds the core,
// which takes effect when the next instruction would be fetched (upc = fetch address), so an
// update never cuts through a running instruction.  hold_ack reports that the core is held.
module useq
  import ucpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  uinstr_t    uir,
  input  logic       cond_true,
  input  uaddr_t     disp_addr,
  input  logic       hold_req,
  output logic       hold_ack,
  output uaddr_t     upc,
  output uaddr_t     upc_next,
  output logic       exec,
  output logic       halted,
  output logic [3:0] halt_cause
);
  logic   started;
  uaddr_t seq_next;

  always_comb begin
    unique case (uir.seq)
      SEQ_INC:   seq_next = upc + 1'b1;
      SEQ_JUMP:  seq_next = cond_true ? uir.target : upc + 1'b1;
      SEQ_FETCH: seq_next = cond_true ? UA_FETCH : upc + 1'b1;
      default:   seq_next = disp_addr;
    endcase
  end

  assign hold_ack = started && !halted && hold_req && (upc == UA_FETCH);
  assign exec     = started && !halted && !hold_ack && !uir.halt;
  assign upc_next = exec ? seq_next : upc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc        <= UA_FETCH;
      started    <= 1'b0;
      halted     <= 1'b0;
      halt_cause <= '0;
    end else begin
      started <= 1'b1;
      upc     <= upc_next;
      if (started && !halted && !hold_ack && uir.halt) begin
        halted     <= 1'b1;
        halt_cause <= uir.konst[3:0];
      end
    end
  end
endmodule
