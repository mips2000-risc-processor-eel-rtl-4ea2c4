// tb_ex_controller: decodes a table of instructions (one per kind) and
// compares the control word with hand-written expectations.
module tb_ex_controller;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic [31:0] instr; ex_ctrl_t ctrl;
  ex_controller dut (.*);
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
  // expected: alu_op, b_imm, sh_var, sh_left, sh_arith, use_shift
  task automatic t(input logic [31:0] i, input alu_op_e o, input bit bi, input bit sv, input bit sl, input bit sa, input bit us);
    instr = i; #1;
    if (us) check(ctrl.use_shift && ctrl.sh_var == sv && ctrl.sh_left == sl && ctrl.sh_arith == sa, $sformatf("shift ctrl %h", i));
    else    check(!ctrl.use_shift && ctrl.alu_op == o && ctrl.b_imm == bi, $sformatf("alu ctrl %h: %p", i, ctrl));
  endtask
  initial begin
    t(r_op(SLL, 1, 0, 2, 3), ALU_ADD, 0, 0, 1, 0, 1);
    t(r_op(SRL, 1, 0, 2, 3), ALU_ADD, 0, 0, 0, 0, 1);
    t(r_op(SRA, 1, 0, 2, 3), ALU_ADD, 0, 0, 0, 1, 1);
    t(r_op(SLLV, 1, 4, 2),   ALU_ADD, 0, 1, 1, 0, 1);
    t(r_op(SRLV, 1, 4, 2),   ALU_ADD, 0, 1, 0, 0, 1);
    t(r_op(SRAV, 1, 4, 2),   ALU_ADD, 0, 1, 0, 1, 1);
    t(r_op(ADD, 1, 2, 3),  ALU_ADD, 0, 0, 0, 0, 0);
    t(r_op(ADDU, 1, 2, 3), ALU_ADD, 0, 0, 0, 0, 0);
    t(r_op(SUB, 1, 2, 3),  ALU_SUB, 0, 0, 0, 0, 0);
    t(r_op(SUBU, 1, 2, 3), ALU_SUB, 0, 0, 0, 0, 0);
    t(r_op(AND, 1, 2, 3),  ALU_AND, 0, 0, 0, 0, 0);
    t(r_op(OR, 1, 2, 3),   ALU_OR,  0, 0, 0, 0, 0);
    t(r_op(XOR, 1, 2, 3),  ALU_XOR, 0, 0, 0, 0, 0);
    t(r_op(NOR, 1, 2, 3),  ALU_NOR, 0, 0, 0, 0, 0);
    t(r_op(SLT, 1, 2, 3),  ALU_SLT, 0, 0, 0, 0, 0);
    t(r_op(SLTU, 1, 2, 3), ALU_SLTU, 0, 0, 0, 0, 0);
    t(i_op(ADDI, 1, 2, 5),  ALU_ADD, 1, 0, 0, 0, 0);
    t(i_op(ADDIU, 1, 2, 5), ALU_ADD, 1, 0, 0, 0, 0);
    t(i_op(SLTI, 1, 2, 5),  ALU_SLT, 1, 0, 0, 0, 0);
    t(i_op(SLTIU, 1, 2, 5), ALU_SLTU, 1, 0, 0, 0, 0);
    t(i_op(ANDI, 1, 2, 5),  ALU_AND, 1, 0, 0, 0, 0);
    t(i_op(ORI, 1, 2, 5),   ALU_OR, 1, 0, 0, 0, 0);
    t(i_op(XORI, 1, 2, 5),  ALU_XOR, 1, 0, 0, 0, 0);
    t(i_op(LUI, 1, 0, 5),   ALU_LUI, 1, 0, 0, 0, 0);
    for (int k = 0; k < 12; k++) begin
      int ops [12] = '{LB, LH, LWL, LW, LBU, LHU, LWR, SB, SH, SWL, SW, SWR};
      t(i_op(ops[k], 1, 2, 8), ALU_ADD, 1, 0, 0, 0, 0);
    end
    t(i_op(BEQ, 1, 2, 8),  ALU_BEQ, 0, 0, 0, 0, 0);
    t(i_op(BNE, 1, 2, 8),  ALU_BNE, 0, 0, 0, 0, 0);
    t(i_op(BLEZ, 0, 2, 8), ALU_BLEZ, 0, 0, 0, 0, 0);
    t(i_op(BGTZ, 0, 2, 8), ALU_BGTZ, 0, 0, 0, 0, 0);
    t(i_op(REGIMM, 0, 2, 8),  ALU_BLTZ, 0, 0, 0, 0, 0);
    t(i_op(REGIMM, 1, 2, 8),  ALU_BGEZ, 0, 0, 0, 0, 0);
    t(i_op(REGIMM, 16, 2, 8), ALU_BLTZ, 0, 0, 0, 0, 0);
    t(i_op(REGIMM, 17, 2, 8), ALU_BGEZ, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
