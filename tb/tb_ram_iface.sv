// tb_ram_iface: checks byte-lane steering for byte, halfword and word stores and the
// alignment and zero/sign extension of loads, for every aligned offset.
module tb_ram_iface;
  import ucpu_pkg::*;
  logic [1:0] addr_lo;
  msize_e size;
  logic uns;
  logic [31:0] st_data, wdata, rdata, ld_data;
  logic [3:0] be;
  int checks = 0, failures = 0;

  ram_iface dut (.addr_lo, .size, .uns, .st_data, .wdata, .be, .rdata, .ld_data);

  task automatic chk(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] byt;
    logic [15:0] hw;
    for (int n = 0; n < 200; n++) begin
      st_data = $urandom; rdata = $urandom;
      for (int o = 0; o < 4; o++) begin
        addr_lo = 2'(o);
        size = MSZ_B; uns = n[0]; #1;
        chk({28'd0, be}, 32'd1 << o, "sb be");
        chk({24'd0, wdata[8*o +: 8]}, {24'd0, st_data[7:0]}, "sb lane");
        byt = rdata[8*o +: 8];
        chk(ld_data, uns ? {24'd0, byt} : {{24{byt[7]}}, byt}, "lb");
        if (o % 2 == 0) begin
          size = MSZ_H; #1;
          chk({28'd0, be}, (o == 0) ? 32'h3 : 32'hC, "sh be");
          chk({16'd0, wdata[8*o +: 16]}, {16'd0, st_data[15:0]}, "sh lane");
          hw = rdata[8*o +: 16];
          chk(ld_data, uns ? {16'd0, hw} : {{16{hw[15]}}, hw}, "lh");
        end
        if (o == 0) begin
          size = MSZ_W; #1;
          chk({28'd0, be}, 32'hF, "sw be");
          chk(wdata, st_data, "sw data");
          chk(ld_data, rdata, "lw");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
