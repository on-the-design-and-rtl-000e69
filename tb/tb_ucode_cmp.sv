// tb_ucode_cmp: checks every comparator condition on corner and random operands against a
// reference computed from 33-bit extended values.
module tb_ucode_cmp;
  import ucpu_pkg::*;
  cond_e cond;
  logic [31:0] a, b;
  logic taken, exp_t;
  int checks = 0, failures = 0;

  ucode_cmp dut (.cond, .a, .b, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [32:0] sa, sb;
    logic [32:0] ua, ub;
    for (int n = 0; n < 2000; n++) begin
      cond = cond_e'(n % 7);
      a = (n % 5 == 0) ? 32'h8000_0000 : $urandom;
      b = (n % 3 == 0) ? a : ((n % 7 == 1) ? 32'h7FFF_FFFF : $urandom);
      #1;
      sa = {a[31], a}; sb = {b[31], b}; ua = {1'b0, a}; ub = {1'b0, b};
      case (cond)
        C_ALWAYS: exp_t = 1;
        C_EQ:     exp_t = (ua - ub) == 0;
        C_NE:     exp_t = (ua - ub) != 0;
        C_LT:     exp_t = (sa - sb) < 0;
        C_GE:     exp_t = !((sa - sb) < 0);
        C_LTU:    exp_t = ua < ub;
        default:  exp_t = !(ua < ub);
      endcase
      checks++;
      if (taken !== exp_t) begin
        failures++;
        if (failures < 10) $display("cmp %0d a=%h b=%h got %b", cond, a, b, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
