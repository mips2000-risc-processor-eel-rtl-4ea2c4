// alu32_turbo: the 32-bit arithmetic/logic unit of the EX stage.
//
// Functions: add, subtract, and, or, xor, nor, signed and unsigned
// set-less-than, load-upper (B << 16), and the branch-condition evaluations
// (a == b, a != b, a <= 0, a > 0, a < 0, a >= 0, signed). For a branch
// operation cond is the condition and result is cond zero-extended; for the
// other operations cond is 0. zero flags a zero result. Adds and subtracts
// wrap and never trap. The xor, nor and branch-condition functions are those
// the document adds to the basic ALU; the encoding is this design's own.
// Combinational.
module alu32_turbo
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] result,
  output logic        zero,
  output logic        cond
);
  always_comb begin
    cond   = 1'b0;
    result = '0;
    unique case (op)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_NOR:  result = ~(a | b);
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_LUI:  result = {b[15:0], 16'h0000};
      ALU_BEQ:  cond = (a == b);
      ALU_BNE:  cond = (a != b);
      ALU_BLEZ: cond = a[31] || (a == '0);
      ALU_BGTZ: cond = !a[31] && (a != '0);
      ALU_BLTZ: cond = a[31];
      ALU_BGEZ: cond = !a[31];
      default:  result = '0;
    endcase
    if (op inside {ALU_BEQ, ALU_BNE, ALU_BLEZ, ALU_BGTZ, ALU_BLTZ, ALU_BGEZ})
      result = {31'b0, cond};
  end
  assign zero = (result == '0);
endmodule
