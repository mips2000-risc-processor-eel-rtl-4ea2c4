// tb_wb_controller: write enable, data source and destination register for
// each instruction class.
module tb_wb_controller;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic [31:0] instr; logic we; cdata_sel_e cdata_sel; caddr_sel_e caddr_sel;
  wb_controller dut (.*);
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
  task automatic t(input logic [31:0] i, input bit w, input cdata_sel_e d, input caddr_sel_e a);
    instr = i; #1;
    check(we == w && (!w || (cdata_sel == d && caddr_sel == a)), $sformatf("instr %h: we %b d %0d a %0d", i, we, cdata_sel, caddr_sel));
  endtask
  initial begin
    t(r_op(ADD, 5, 1, 2), 1, CD_ALU, CA_RD);
    t(r_op(SLL, 5, 0, 2, 3), 1, CD_ALU, CA_RD);
    t(r_op(JR, 0, 31, 0), 0, CD_ALU, CA_RD);
    t(r_op(JALR, 7, 3, 0), 1, CD_PC4, CA_RD);
    t(r_op(JALR, 0, 3, 0), 1, CD_PC4, CA_RA);
    t(j_op(JAL, 'h40), 1, CD_PC4, CA_RA);
    t(j_op(J, 'h40), 0, CD_ALU, CA_RD);
    for (int k = 0; k < 8; k++) begin
      int o [8] = '{ADDI, ADDIU, SLTI, SLTIU, ANDI, ORI, XORI, LUI};
      t(i_op(o[k], 6, 1, 9), 1, CD_ALU, CA_RT);
    end
    for (int k = 0; k < 7; k++) begin
      int o [7] = '{LB, LH, LWL, LW, LBU, LHU, LWR};
      t(i_op(o[k], 6, 1, 9), 1, CD_MEM, CA_RT);
    end
    for (int k = 0; k < 9; k++) begin
      int o [9] = '{SB, SH, SWL, SW, SWR, BEQ, BNE, BLEZ, BGTZ};
      t(i_op(o[k], 6, 1, 9), 0, CD_ALU, CA_RD);
    end
    t(i_op(REGIMM, 0, 1, 9), 0, CD_ALU, CA_RD);
    t(i_op(REGIMM, 1, 1, 9), 0, CD_ALU, CA_RD);
    t(i_op(REGIMM, 16, 1, 9), 1, CD_PC4, CA_RA);
    t(i_op(REGIMM, 17, 1, 9), 1, CD_PC4, CA_RA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
