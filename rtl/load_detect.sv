// load_detect: the Load Detection Unit. Combinational: mem_read is high when
// the opcode (taken from the ID/EX register) is one of the loads lb, lh, lwl,
// lw, lbu, lhu, lwr, i.e. the instruction will write a register with data
// that only exists after the MEM stage.
module load_detect
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output logic       mem_read
);
  assign mem_read = is_load(opcode);
endmodule
