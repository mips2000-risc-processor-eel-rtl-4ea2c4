// ex_controller: the Execution Stage Controller.
//
// Decodes the opcode, function code and (for REGIMM branches) the rt field of
// the instruction in EX into the controls of the ALU 32 Turbo, the ALU B-side
// multiplexer, the shift-amount multiplexer, the barrel shifter and the
// ALU/shifter result multiplexer. Loads and stores compute rs + offset;
// branches use the ALU's condition functions; jumps do not use the ALU.
// Combinational.
module ex_controller
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output ex_ctrl_t    ctrl
);
  logic [5:0] op, fn;
  logic [4:0] rt;
  assign op = f_opcode(instr);
  assign fn = f_funct(instr);
  assign rt = f_rt(instr);

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, b_imm: 1'b0, sh_var: 1'b0, sh_left: 1'b0, sh_arith: 1'b0, use_shift: 1'b0};
    unique case (op)
      OP_SPECIAL: begin
        unique case (fn)
          FN_SLL:  begin ctrl.use_shift = 1'b1; ctrl.sh_left = 1'b1; end
          FN_SRL:  ctrl.use_shift = 1'b1;
          FN_SRA:  begin ctrl.use_shift = 1'b1; ctrl.sh_arith = 1'b1; end
          FN_SLLV: begin ctrl.use_shift = 1'b1; ctrl.sh_left = 1'b1; ctrl.sh_var = 1'b1; end
          FN_SRLV: begin ctrl.use_shift = 1'b1; ctrl.sh_var = 1'b1; end
          FN_SRAV: begin ctrl.use_shift = 1'b1; ctrl.sh_arith = 1'b1; ctrl.sh_var = 1'b1; end
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: ctrl.alu_op = ALU_ADD;   // add, addu, jr, jalr
        endcase
      end
      OP_REGIMM: ctrl.alu_op = (rt[0]) ? ALU_BGEZ : ALU_BLTZ;
      OP_BEQ:    ctrl.alu_op = ALU_BEQ;
      OP_BNE:    ctrl.alu_op = ALU_BNE;
      OP_BLEZ:   ctrl.alu_op = ALU_BLEZ;
      OP_BGTZ:   ctrl.alu_op = ALU_BGTZ;
      OP_ADDI, OP_ADDIU: begin ctrl.alu_op = ALU_ADD;  ctrl.b_imm = 1'b1; end
      OP_SLTI:   begin ctrl.alu_op = ALU_SLT;  ctrl.b_imm = 1'b1; end
      OP_SLTIU:  begin ctrl.alu_op = ALU_SLTU; ctrl.b_imm = 1'b1; end
      OP_ANDI:   begin ctrl.alu_op = ALU_AND;  ctrl.b_imm = 1'b1; end
      OP_ORI:    begin ctrl.alu_op = ALU_OR;   ctrl.b_imm = 1'b1; end
      OP_XORI:   begin ctrl.alu_op = ALU_XOR;  ctrl.b_imm = 1'b1; end
      OP_LUI:    begin ctrl.alu_op = ALU_LUI;  ctrl.b_imm = 1'b1; end
      default: begin
        // loads and stores: effective address rs + offset; jumps: unused
        ctrl.alu_op = ALU_ADD;
        ctrl.b_imm  = (op[5] == 1'b1);
      end
    endcase
  end
endmodule
