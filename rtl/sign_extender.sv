// sign_extender: widens the 16-bit immediate field to 32 bits.
//
// The logical-immediate instructions (andi, ori, xori) get zero extension;
// every other instruction gets sign extension, as the document specifies.
// Combinational.
module sign_extender
  import mips_pkg::*;
(
  input  logic [5:0]  opcode,
  input  logic [15:0] imm,
  output logic [31:0] ext
);
  always_comb begin
    if (opcode inside {OP_ANDI, OP_ORI, OP_XORI}) ext = {16'h0000, imm};
    else                                          ext = {{16{imm[15]}}, imm};
  end
endmodule
