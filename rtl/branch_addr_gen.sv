// branch_addr_gen: the Branch Address Generator. Combinational:
// branch = pc_plus4 + (imm << 2), where imm is the sign-extended 16-bit word
// offset, so a branch reaches 2^15-1 instructions forward or 2^15 back.
module branch_addr_gen (
  input  logic [31:0] pc_plus4,
  input  logic [31:0] imm,
  output logic [31:0] branch
);
  assign branch = pc_plus4 + {imm[29:0], 2'b00};
endmodule
