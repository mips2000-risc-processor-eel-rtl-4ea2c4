// hazard_detection_unit: detects the load-use hazard forwarding cannot cover.
//
// When the instruction in EX (ID/EX) is a load and its rt is either source
// register (rs or rt) of the instruction in ID (IF/ID), stall goes high for
// that cycle: the PC and IF/ID hold, ID/EX is cleared to a NOP, so the
// dependent instruction reaches EX one cycle later and takes the loaded value
// by forwarding from MEM/WB. The comparison follows the document's logic
// exactly, including register 0. Combinational.
module hazard_detection_unit (
  input  logic       id_ex_mem_read,
  input  logic [4:0] id_ex_rt,
  input  logic [4:0] if_id_rs,
  input  logic [4:0] if_id_rt,
  output logic       stall
);
  assign stall = id_ex_mem_read && ((id_ex_rt == if_id_rs) || (id_ex_rt == if_id_rt));
endmodule
