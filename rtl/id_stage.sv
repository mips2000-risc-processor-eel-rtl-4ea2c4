// id_stage: instruction decode.
//
// Reads registers rs and rt of the IF/ID instruction from the register array
// (write-back data of the same cycle is passed through), extends the
// immediate, and runs the Hazard Detection Unit against the instruction in
// ID/EX (whose load-ness comes from the Load Detection Unit). The write port
// of the register array is driven by the WB stage. Outputs are combinational
// and form the next ID/EX contents.
module id_stage
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  if_id_t      if_id,
  input  logic [31:0] id_ex_instr,   // instruction now in EX
  input  logic        wb_we,
  input  logic [4:0]  wb_addr,
  input  logic [31:0] wb_data,
  output id_ex_t      id_out,
  output logic        stall
);
  logic [31:0] a_data, b_data, ext;
  logic        ex_is_load;

  reg_array_32x32 u_rf (
    .clk, .rst,
    .a_addr(f_rs(if_id.instr)), .b_addr(f_rt(if_id.instr)),
    .a_data, .b_data,
    .we(wb_we), .c_addr(wb_addr), .c_data(wb_data)
  );

  sign_extender u_sext (.opcode(f_opcode(if_id.instr)), .imm(if_id.instr[15:0]), .ext);

  load_detect u_ld (.opcode(f_opcode(id_ex_instr)), .mem_read(ex_is_load));

  hazard_detection_unit u_hdu (
    .id_ex_mem_read(ex_is_load), .id_ex_rt(f_rt(id_ex_instr)),
    .if_id_rs(f_rs(if_id.instr)), .if_id_rt(f_rt(if_id.instr)),
    .stall
  );

  always_comb begin
    id_out.instr    = if_id.instr;
    id_out.pc_plus4 = if_id.pc_plus4;
    id_out.a        = a_data;
    id_out.b        = b_data;
    id_out.imm      = ext;
  end
endmodule
