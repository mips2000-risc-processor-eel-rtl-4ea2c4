// tb_nextpc_gen: next-PC source and flush for each control instruction with
// the branch condition true and false, and for ordinary instructions.
module tb_nextpc_gen;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic [31:0] instr; logic cond, flush; npc_sel_e sel;
  nextpc_gen dut (.*);
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
  task automatic t(input logic [31:0] i, input bit c, input npc_sel_e e);
    instr = i; cond = c; #1;
    check(sel == e && flush == (e != NPC_PC4), $sformatf("instr %h cond %b: sel %0d expected %0d", i, c, sel, e));
  endtask
  initial begin
    for (int c = 0; c < 2; c++) begin
      t(j_op(J, 'h100), c, NPC_JUMP);
      t(j_op(JAL, 'h100), c, NPC_JUMP);
      t(r_op(JR, 0, 31, 0), c, NPC_REG);
      t(r_op(JALR, 31, 4, 0), c, NPC_REG);
      for (int k = 0; k < 5; k++) begin
        int b [5] = '{BEQ, BNE, BLEZ, BGTZ, REGIMM};
        t(i_op(b[k], 1, 2, 4), c, c ? NPC_BRANCH : NPC_PC4);
      end
      t(r_op(ADD, 1, 2, 3), c, NPC_PC4);
      t(i_op(LW, 1, 2, 3), c, NPC_PC4);
      t(i_op(SW, 1, 2, 3), c, NPC_PC4);
      t(32'h0, c, NPC_PC4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
