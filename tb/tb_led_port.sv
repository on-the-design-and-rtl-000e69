// tb_led_port: checks reset value, full and byte-masked writes, and read-back of the LEDs.
module tb_led_port;
  import ucpu_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0;
  bus_req_t req;
  logic [31:0] rdata;
  logic [15:0] led, exp_led;
  int checks = 0, failures = 0;

  led_port #(.N_LED(16)) dut (.clk, .rst_n, .sel, .req, .rdata, .led);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s led=%h", what, led); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1 chk(led == 0, "reset");
    exp_led = 0;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk); sel = n[0] | n[2]; req.we = 1; req.addr = LED_BASE;
      req.be = 4'($urandom); req.wdata = $urandom;
      if (sel) begin
        if (req.be[0]) exp_led[7:0] = req.wdata[7:0];
        if (req.be[1]) exp_led[15:8] = req.wdata[15:8];
      end
      @(posedge clk); #1 chk(led == exp_led, "write");
      @(negedge clk); req.we = 0;
      @(posedge clk); #1 chk(rdata == {16'd0, exp_led}, "readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
