// tb_regfile: writes random values to all general-purpose and scratch registers and reads
// them back against a shadow array; checks that x0 stays zero and that reset clears the
// scratch registers.
module tb_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] shadow [36];
  int checks = 0, failures = 0;

  regfile #(.N_SCRATCH(4)) dut (.clk, .rst_n, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 32; i < 36; i++) begin
      addr = 6'(i); #1; chk(rdata, 0, "scratch after reset");
    end
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 36; i++) begin
        @(negedge clk);
        addr = 6'(i); we = 1; wdata = $urandom;
        shadow[i] = (i == 0) ? 32'd0 : wdata;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 36; i++) begin
        addr = 6'(i); #1; chk(rdata, shadow[i], $sformatf("reg %0d", i));
      end
    end
    rst_n = 0; #1; rst_n = 1;
    for (int i = 32; i < 36; i++) begin
      addr = 6'(i); #1; chk(rdata, 0, "scratch after 2nd reset");
    end
    addr = 6'd5; #1; chk(rdata, shadow[5], "gpr kept over reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
