// tb_useq: drives microinstructions into the sequencer and checks the next microprogram
// address for increment, taken and not-taken conditional jumps and fetches, dispatch, the
// sticky halt and the hold at the fetch boundary.
module tb_useq;
  import ucpu_pkg::*;
  logic clk = 0, rst_n = 0, cond_true = 0, hold_req = 0;
  uinstr_t uir;
  uaddr_t disp_addr = 0, upc, upc_next;
  logic hold_ack, exec, halted;
  logic [3:0] halt_cause;
  int checks = 0, failures = 0;

  useq dut (.clk, .rst_n, .uir, .cond_true, .disp_addr, .hold_req, .hold_ack, .upc, .upc_next,
            .exec, .halted, .halt_cause);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (upc=%0d next=%0d)", what, upc, upc_next);
    end
  endtask

  // apply one microinstruction for one cycle and check the uPC that follows
  task automatic step(seq_e s, logic c, uaddr_t tgt, uaddr_t exp_next, string what);
    @(negedge clk);
    uir = '0; uir.seq = s; uir.target = tgt; cond_true = c;
    #1 chk(upc_next == exp_next, what);
    @(posedge clk); #1 chk(upc == exp_next, {what, " (registered)"});
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uir = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    #1 chk(!exec && upc_next == 0, "frozen in first cycle after reset");
    @(posedge clk); #1 chk(exec, "running");
    step(SEQ_INC, 0, 0, 1, "inc");
    step(SEQ_INC, 1, 0, 2, "inc");
    step(SEQ_JUMP, 1, 10'd200, 200, "jump taken");
    step(SEQ_JUMP, 0, 10'd50, 201, "jump not taken");
    step(SEQ_FETCH, 0, 0, 202, "fetch not taken");
    step(SEQ_FETCH, 1, 0, 0, "fetch taken");
    disp_addr = 10'd144;
    step(SEQ_DISP, 0, 0, 144, "dispatch");
    // hold: at upc == 0 the core waits
    step(SEQ_FETCH, 1, 0, 0, "fetch to 0");
    @(negedge clk); hold_req = 1; uir = '0; #1;
    chk(hold_ack && !exec && upc_next == 0, "held at boundary");
    repeat (3) @(posedge clk);
    #1 chk(upc == 0 && hold_ack, "still held");
    @(negedge clk); hold_req = 0; #1 chk(exec && upc_next == 1, "released");
    @(posedge clk);
    // hold request away from the boundary is not acknowledged until fetch
    @(negedge clk); hold_req = 1; #1 chk(!hold_ack && exec, "no hold mid-instruction");
    step(SEQ_FETCH, 1, 0, 0, "fetch while hold pending");
    #1 chk(hold_ack, "hold taken at fetch");
    @(negedge clk); hold_req = 0;
    // halt
    @(negedge clk); uir = '0; uir.halt = 1; uir.konst = 32'd2; #1;
    chk(!exec && upc_next == upc, "halt step does not advance");
    @(posedge clk); #1 chk(halted && halt_cause == 4'd2, "halted with cause");
    @(negedge clk); uir = '0; #1 chk(!exec, "stays halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
