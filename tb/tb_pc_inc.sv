// tb_pc_inc: PC+4 for random and boundary PC values.
module tb_pc_inc;
  logic [31:0] pc, pc_plus4;
  pc_inc dut (.*);
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
    pc = 32'hFFFF_FFFC; #1 check(pc_plus4 == 0, "wrap");
    repeat (1000) begin
      pc = $urandom; #1;
      check(pc_plus4 == pc + 4, $sformatf("%h -> %h", pc, pc_plus4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
