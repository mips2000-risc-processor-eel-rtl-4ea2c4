// tb_barrel_shifter: all amounts and directions on random data.
module tb_barrel_shifter;
  logic [31:0] din, dout; logic [4:0] shamt; logic left, arith;
  barrel_shifter dut (.*);
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
    repeat (4000) begin
      logic [31:0] e;
      din = $urandom; shamt = $urandom; left = $urandom; arith = $urandom; #1;
      if (left) e = din << shamt;
      else if (arith) e = $signed(din) >>> shamt;
      else e = din >> shamt;
      check(dout == e, $sformatf("%h sh %0d l%b a%b -> %h", din, shamt, left, arith, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
