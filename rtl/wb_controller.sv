// wb_controller: the Write Back Controller.
//
// Decodes an instruction into: we (it writes a register), cdata_sel (the
// value written: ALU result, load data, or PC+4 for the link instructions) and
// caddr_sel (the register written: rd for R-type, rt for immediate and load
// instructions, r31 for jal, bltzal, bgezal and for jalr with rd = 0).
// Stores, branches, j and jr write nothing. Writes to r0 are reported but the
// register array drops them. The same decoder is also used on the EX/MEM
// instruction to tell the forwarding unit what that instruction will write.
// Combinational.
module wb_controller
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  output logic        we,
  output cdata_sel_e  cdata_sel,
  output caddr_sel_e  caddr_sel
);
  logic [5:0] op;
  assign op = f_opcode(instr);

  always_comb begin
    we        = 1'b0;
    cdata_sel = CD_ALU;
    caddr_sel = CA_RD;
    unique case (op)
      OP_SPECIAL: begin
        unique case (f_funct(instr))
          FN_JR:   we = 1'b0;
          FN_JALR: begin
            we        = 1'b1;
            cdata_sel = CD_PC4;
            caddr_sel = (f_rd(instr) == 5'd0) ? CA_RA : CA_RD;
          end
          default: we = 1'b1;
        endcase
      end
      OP_REGIMM: if (f_rt(instr) inside {RT_BLTZAL, RT_BGEZAL}) begin
        we = 1'b1; cdata_sel = CD_PC4; caddr_sel = CA_RA;
      end
      OP_JAL: begin we = 1'b1; cdata_sel = CD_PC4; caddr_sel = CA_RA; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        we = 1'b1; caddr_sel = CA_RT;
      end
      default: if (is_load(op)) begin
        we = 1'b1; cdata_sel = CD_MEM; caddr_sel = CA_RT;
      end
    endcase
  end
endmodule
