// tb_soc_bus: checks address decoding of every region of the memory map and that read data
// comes from the selected slave (zero for unmapped addresses).
module tb_soc_bus;
  import ucpu_pkg::*;
  bus_req_t req;
  logic [31:0] rdata;
  logic s_ram, s_uart, s_tim, s_led, s_ucu;
  int checks = 0, failures = 0;

  soc_bus #(.RAM_BYTES(32768)) dut (
    .req, .rdata, .sel_ram(s_ram), .sel_uart(s_uart), .sel_tim(s_tim), .sel_led(s_led),
    .sel_ucu(s_ucu), .rdata_ram(32'hAAAA_0001), .rdata_uart(32'hAAAA_0002),
    .rdata_tim(32'hAAAA_0003), .rdata_led(32'hAAAA_0004), .rdata_ucu(32'hAAAA_0005)
  );

  task automatic probe(logic [31:0] a, logic [4:0] exp_sel, logic [31:0] exp_rd);
    req = '0; req.addr = a; #1;
    checks++;
    if ({s_ram, s_uart, s_tim, s_led, s_ucu} !== exp_sel || rdata !== exp_rd) begin
      failures++;
      $display("addr %h: sel %b rdata %h", a, {s_ram, s_uart, s_tim, s_led, s_ucu}, rdata);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    probe(32'h0000_0000, 5'b10000, 32'hAAAA_0001);
    probe(32'h0000_7FFC, 5'b10000, 32'hAAAA_0001);
    probe(32'h0000_8000, 5'b00000, 32'h0);
    probe(32'h1000_0000, 5'b01000, 32'hAAAA_0002);
    probe(32'h1000_0004, 5'b01000, 32'hAAAA_0002);
    probe(32'h1000_0104, 5'b00100, 32'hAAAA_0003);
    probe(32'h1000_0200, 5'b00010, 32'hAAAA_0004);
    probe(32'h1000_0318, 5'b00001, 32'hAAAA_0005);
    probe(32'h1000_0400, 5'b00000, 32'h0);
    probe(32'h2000_0000, 5'b00000, 32'h0);
    for (int n = 0; n < 100; n++) probe(32'($urandom_range(32767, 0)) & ~32'h3, 5'b10000, 32'hAAAA_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
