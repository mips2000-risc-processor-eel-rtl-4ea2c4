// tb_prog_cntr: random clear/hold/load sequences against a register model.
module tb_prog_cntr;
  logic clk = 0, clr, hold;
  logic [31:0] d, q, m;
  always #5 clk = ~clk;
  prog_cntr dut (.*);
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
    clr = 1; hold = 0; d = 0;
    @(negedge clk); m = 0;
    check(q == 0, "clear");
    repeat (2000) begin
      clr = ($urandom % 10) == 0; hold = ($urandom % 3) == 0; d = $urandom;
      if (clr) m = 0; else if (!hold) m = d;
      @(negedge clk);
      check(q == m, $sformatf("q=%h expected %h", q, m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
