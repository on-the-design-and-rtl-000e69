// tb_sys_ram: random byte-enabled writes over the whole 32 KB against a shadow memory, then
// read-back of every written word, checking the one-cycle read latency and that writes
// without select are ignored.
module tb_sys_ram;
  import ucpu_pkg::*;
  logic clk = 0, sel = 0;
  bus_req_t req;
  logic [31:0] rdata;
  logic [31:0] shadow [8192];
  int checks = 0, failures = 0;

  sys_ram #(.BYTES(32768)) dut (.clk, .sel, .req, .rdata);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); sel = 1; req.we = 1; req.be = 4'hF; req.addr = 32'(i * 4);
      req.wdata = $urandom; shadow[i] = req.wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      int w;
      w = int'($urandom_range(8191, 0));
      @(negedge clk); req.addr = 32'(w * 4); req.be = 4'($urandom); req.wdata = $urandom;
      sel = n[0] | n[1];
      for (int b = 0; b < 4; b++) if (sel && req.be[b]) shadow[w][8*b +: 8] = req.wdata[8*b +: 8];
    end
    @(negedge clk); req.we = 0; sel = 1;
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk); req.addr = 32'(i * 4);
      @(posedge clk); #1 chk(rdata, shadow[i], $sformatf("word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
