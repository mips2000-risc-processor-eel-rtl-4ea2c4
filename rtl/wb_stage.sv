// wb_stage: write back.
//
// The Write Back Controller decodes the MEM/WB instruction; the C-Data
// Selector (3 x 32 mux) picks ALU result, load data or PC+4, and the C-Address
// Selector (3 x 5 mux) picks rd, rt or 31. The outputs drive the write port
// of the register array (written at the next clock edge) and the MEM/WB
// forwarding path. Combinational.
module wb_stage
  import mips_pkg::*;
(
  input  mem_wb_t     mem_wb,
  output logic        we,
  output logic [4:0]  c_addr,
  output logic [31:0] c_data
);
  cdata_sel_e cds;
  caddr_sel_e cas;

  wb_controller u_ctl (.instr(mem_wb.instr), .we, .cdata_sel(cds), .caddr_sel(cas));

  mux_n #(.WIDTH(32), .N(3)) u_cdata (
    .din({mem_wb.pc_plus4, mem_wb.lmd, mem_wb.alu}), .sel(cds), .dout(c_data));
  mux_n #(.WIDTH(5), .N(3)) u_caddr (
    .din({RA, f_rt(mem_wb.instr), f_rd(mem_wb.instr)}), .sel(cas), .dout(c_addr));
endmodule
