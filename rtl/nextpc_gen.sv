// nextpc_gen: the NextPC_Gen unit plus the Flush_Pipeline logic.
//
// From the instruction in MEM and the branch condition the ALU computed for
// it, selects the next-PC source: the fetch stage's PC+4 (no control
// transfer, or a branch not taken), the jump address (j, jal), the branch
// target (taken beq, bne, blez, bgtz, bltz, bgez, bltzal, bgezal) or the
// register value (jr, jalr). Fetch always assumes "not taken", so any other
// source than PC+4 means the three younger instructions are wrong: flush is
// raised to clear IF/ID, ID/EX and EX/MEM. Flushing on jr/jalr as well as on
// branches and jumps is this design's reading. Combinational.
module nextpc_gen
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        cond,
  output npc_sel_e    sel,
  output logic        flush
);
  logic [5:0] op;
  assign op = f_opcode(instr);

  always_comb begin
    sel = NPC_PC4;
    unique case (op)
      OP_J, OP_JAL: sel = NPC_JUMP;
      OP_SPECIAL:   if (f_funct(instr) inside {FN_JR, FN_JALR}) sel = NPC_REG;
      OP_REGIMM, OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ: if (cond) sel = NPC_BRANCH;
      default:      sel = NPC_PC4;
    endcase
  end
  assign flush = (sel != NPC_PC4);
endmodule
