// tb_uart: sends random bytes to the receiver with a serial driver in the testbench and
// checks the received byte and status bits; captures transmitted bytes with a serial monitor
// and checks data, framing and the bit time of CLK_DIV clocks.
module tb_uart;
  import ucpu_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, sel = 1, rx = 1, tx;
  bus_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  uart #(.CLK_DIV(DIV)) dut (.clk, .rst_n, .sel, .req, .rdata, .rx, .tx);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (DIV) @(posedge clk);
    end
  endtask

  task automatic rd(logic [31:0] a, logic take);
    @(negedge clk); req.we = 0; req.re = take; req.addr = a;
    @(posedge clk); #1;
    @(negedge clk); req.re = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int t_start, t_stop;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // receive
    for (int n = 0; n < 20; n++) begin
      b = 8'($urandom);
      send(b);
      repeat (4) @(posedge clk);
      rd(UART_BASE + 4, 0); chk(rdata[1] == 1'b1, "rx valid");
      rd(UART_BASE, 1);     chk(rdata[7:0] == b, $sformatf("rx byte %h got %h", b, rdata[7:0]));
      rd(UART_BASE + 4, 0); chk(rdata[1] == 1'b0, "rx valid cleared");
    end
    // transmit
    for (int n = 0; n < 10; n++) begin
      b = 8'($urandom);
      @(negedge clk); req.addr = UART_BASE; req.we = 1; req.wdata = {24'd0, b};
      @(negedge clk); req.we = 0; req.addr = UART_BASE + 4;
      @(posedge clk); #1 chk(rdata[0] == 1'b1, "tx busy");
      wait (tx == 1'b0);
      t_start = $time;
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        got[i] = tx;
      end
      repeat (DIV) @(posedge clk);
      chk(tx == 1'b1, "stop bit");
      chk(got == b, $sformatf("tx byte %h got %h", b, got));
      wait (dut.tx_busy == 1'b0);
      t_stop = $time;
      chk((t_stop - t_start) / 10 >= 10 * DIV - 3 && (t_stop - t_start) / 10 <= 10 * DIV + 1,
          $sformatf("frame length %0d cycles", (t_stop - t_start) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
