// tb_load_detect: all 64 opcodes; loads are 0x20-0x26.
module tb_load_detect;
  logic [5:0] opcode; logic mem_read;
  load_detect dut (.*);
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
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op); #1;
      check(mem_read == (op >= 32 && op <= 38), $sformatf("op %h", op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
