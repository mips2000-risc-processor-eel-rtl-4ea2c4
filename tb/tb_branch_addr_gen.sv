// tb_branch_addr_gen: target = PC+4 + 4 x signed offset.
module tb_branch_addr_gen;
  logic [31:0] pc_plus4, imm, branch;
  branch_addr_gen dut (.*);
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
    repeat (2000) begin
      logic [15:0] off; off = $urandom;
      pc_plus4 = $urandom & ~32'h3; imm = {{16{off[15]}}, off}; #1;
      check(branch == pc_plus4 + 32'($signed(off) * 4), $sformatf("%h %h -> %h", pc_plus4, off, branch));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
