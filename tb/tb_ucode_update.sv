// tb_ucode_update: stages random microcode words and dispatch entries through the register
// interface, requests a flush and checks that the unit waits for the core to be held, then
// writes exactly the staged entries, in order, one per clock, and releases the core.  Also
// checks the status register and that entries beyond the buffer depth are dropped.
module tb_ucode_update;
  import ucpu_pkg::*;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 1, sel = 1, hold_ack = 0;
  bus_req_t req;
  logic [31:0] rdata;
  logic hold_req, uc_we, dt_we, busy;
  uaddr_t uc_waddr, dt_wdata;
  uinstr_t uc_wdata;
  logic [KEY_W-1:0] dt_waddr;
  int checks = 0, failures = 0;

  typedef struct { logic dtab; int addr; logic [95:0] data; } ent_t;
  ent_t exp_q [$];
  int n_written = 0, first_wr = -1, last_wr = -1, cyc = 0;

  ucode_update #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .sel, .req, .rdata, .hold_req, .hold_ack, .uc_we, .uc_waddr, .uc_wdata,
    .dt_we, .dt_waddr, .dt_wdata, .busy
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [7:0] off, logic [31:0] d);
    @(negedge clk); req.we = 1; req.addr = UCU_BASE + 32'(off); req.wdata = d;
    @(negedge clk); req.we = 0;
  endtask

  task automatic rd(logic [7:0] off);
    @(negedge clk); req.addr = UCU_BASE + 32'(off);
    @(posedge clk); #1;
  endtask

  // emulated core: acknowledges the hold 5 cycles after the request
  initial begin
    forever begin
      @(posedge clk);
      if (hold_req && !hold_ack) begin
        repeat (5) @(posedge clk);
        #1 hold_ack = 1;
      end else if (!hold_req) #1 hold_ack = 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && (uc_we || dt_we)) begin
      ent_t e;
      if (!hold_ack) begin checks++; failures++; $display("FAIL write without hold"); end
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra write"); end
      else begin
        e = exp_q.pop_front();
        if (e.dtab != dt_we ||
            (dt_we && (int'(dt_waddr) != (e.addr & 511) || dt_wdata != e.data[9:0])) ||
            (uc_we && (int'(uc_waddr) != e.addr || uc_wdata != e.data[UI_W-1:0]))) begin
          failures++;
          if (failures < 20) $display("FAIL entry %0d mismatch", n_written);
        end
      end
      n_written++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ent_t e;
    int n;
    req = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      n = (round == 0) ? 40 : DEPTH + 3;
      for (int i = 0; i < n; i++) begin
        e.dtab = ($urandom_range(3, 0) == 0);
        e.addr = e.dtab ? int'($urandom_range(511, 0)) : int'($urandom_range(1023, 0));
        e.data = {$urandom, $urandom, $urandom};
        if (e.dtab) e.data[95:10] = '0;
        wr(8'h00, {e.dtab, 21'd0, 10'(e.addr)});
        wr(8'h04, e.data[31:0]);
        wr(8'h08, e.data[63:32]);
        wr(8'h0C, e.data[95:64]);
        wr(8'h10, 32'd0);
        if (i < DEPTH) exp_q.push_back(e);
      end
      rd(8'h18);
      chk(rdata[15:0] == 16'((n < DEPTH) ? n : DEPTH), $sformatf("staged count %0d", rdata[15:0]));
      chk(rdata[30] == (n > DEPTH), "dropped flag");
      chk(n_written == 0 || round == 1, "nothing written before flush");
      first_wr = -1;
      wr(8'h14, 32'd0);
      chk(busy && hold_req, "flush requests hold");
      wait (!busy);
      @(posedge clk); #1;
      chk(exp_q.size() == 0, $sformatf("all entries written (%0d left)", exp_q.size()));
      chk(last_wr - first_wr + 1 == ((n < DEPTH) ? n : DEPTH), "one entry per clock");
      chk(!hold_req, "core released");
      rd(8'h18);
      chk(rdata[15:0] == 0 && !rdata[31], "buffer empty after flush");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
