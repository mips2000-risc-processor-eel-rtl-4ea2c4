// tb_if_id_reg: random clear/hold sequences against a register model;
// a clear must leave a NOP (all-zero instruction word).
module tb_if_id_reg;
  import mips_pkg::*;
  logic clk = 0, clr; logic hold;
  if_id_t d, q, m;
  always #5 clk = ~clk;
  if_id_reg dut (.clk, .clr, .hold, .d, .q);
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
    clr = 1; hold = 0; d = '0; @(negedge clk); m = '0;
    repeat (2000) begin
      clr = ($urandom % 6) == 0; hold = ($urandom % 3) == 0;
      for (int k = 0; k < $bits(d) / 32 + 1; k++) d = {d, 32'($urandom)};
      if (clr) m = '0;
      else if (!hold) m = d;
      @(negedge clk);
      check(q == m, "register contents");
      if (clr) check(q.instr == 32'h0, "cleared to NOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
