// pc_inc: the PCplus4 adder of the fetch stage. Combinational: pc_plus4 =
// pc + 4 (modulo 2^32), the address of the next sequential instruction.
module pc_inc (
  input  logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  assign pc_plus4 = pc + 32'd4;
endmodule
