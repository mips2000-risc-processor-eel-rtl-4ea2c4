// tb_sign_extender: zero extension for andi/ori/xori (0x0C-0x0E), sign
// extension for every other opcode.
module tb_sign_extender;
  logic [5:0] opcode; logic [15:0] imm; logic [31:0] ext;
  sign_extender dut (.*);
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
    for (int op = 0; op < 64; op++) repeat (40) begin
      logic [31:0] e;
      opcode = 6'(op); imm = $urandom; #1;
      e = (op >= 12 && op <= 14) ? {16'h0, imm} : {{16{imm[15]}}, imm};
      check(ext == e, $sformatf("op %h imm %h -> %h", op, imm, ext));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
