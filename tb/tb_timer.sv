// tb_timer: checks that the cycle counter advances by exactly one per clock, that its high
// word carries, and that a write clears it.
module tb_timer;
  import ucpu_pkg::*;
  logic clk = 0, rst_n = 0, sel = 1;
  bus_req_t req;
  logic [31:0] rdata, t0, t1;
  int checks = 0, failures = 0;

  timer dut (.clk, .rst_n, .sel, .req, .rdata);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1 t0 = rdata;
    repeat (100) @(posedge clk);
    #1 t1 = rdata;
    chk(t1 - t0 == 100, $sformatf("100 cycles measured as %0d", t1 - t0));
    @(negedge clk); req.we = 1; req.addr = TIM_BASE;
    @(negedge clk); req.we = 0;
    @(posedge clk); #1 chk(rdata <= 2, $sformatf("cleared: %0d", rdata));
    force dut.cnt = 64'h0000_0000_FFFF_FFF0;
    @(posedge clk); release dut.cnt;
    repeat (40) @(posedge clk);
    @(negedge clk); req.addr = TIM_BASE + 4;
    @(posedge clk); #1 chk(rdata == 1, $sformatf("high word after carry: %0d", rdata));
    for (int n = 0; n < 20; n++) begin
      int d;
      d = int'($urandom_range(50, 1));
      @(negedge clk); req.addr = TIM_BASE;
      @(posedge clk); #1 t0 = rdata;
      repeat (d) @(posedge clk);
      #1 chk(rdata - t0 == 32'(d), "interval");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
