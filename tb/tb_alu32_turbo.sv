// tb_alu32_turbo: every operation on random and corner operands against
// arithmetic worked out in the testbench.
module tb_alu32_turbo;
  import mips_pkg::*;
  logic [31:0] a, b, result; alu_op_e op; logic zero, cond;
  alu32_turbo dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int o = 0; o < 15; o++) repeat (500) begin
      logic [31:0] e; logic c; int sa, sb;
      op = alu_op_e'(o);
      a = ($urandom % 5 == 0) ? 0 : ($urandom % 4 == 0) ? 32'h8000_0000 : $urandom;
      b = ($urandom % 4 == 0) ? a : $urandom;
      #1;
      sa = a; sb = b; c = 0;
      case (o)
        0: e = a + b;  1: e = a - b;  2: e = a & b;  3: e = a | b;
        4: e = a ^ b;  5: e = ~(a | b);
        6: e = (sa < sb) ? 1 : 0;
        7: e = ({1'b0, a} < {1'b0, b}) ? 1 : 0;
        8: e = b << 16;
        9: c = a == b;  10: c = a != b;  11: c = sa <= 0;  12: c = sa > 0;  13: c = sa < 0;  14: c = sa >= 0;
        default: e = 0;
      endcase
      if (o >= 9) e = c;
      check(result == e && cond == c && zero == (e == 0), $sformatf("op %0d a %h b %h -> %h/%b", o, a, b, result, cond));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
