// mips2000: five-stage pipelined MIPS2000 integer core (IF, ID, EX, MEM, WB)
// with separate program and data memories (Harvard organisation).
//
// Hazard handling:
//  * Forwarding: EX operands come from EX/MEM or MEM/WB when an older
//    instruction writes the register being read; the register array also
//    passes same-cycle write-back data to decode.
//  * Load-use stall: when a load in EX writes a register the instruction in
//    ID reads, the PC and IF/ID hold for one cycle and ID/EX is cleared.
//  * Assume not taken: fetch always continues at PC+4. The branch condition
//    and targets are resolved in MEM; when the next PC is not PC+4 the
//    MEM stage raises flush, which clears IF/ID, ID/EX and EX/MEM (three NOPs,
//    a three-cycle penalty) and loads the PC with the target.
// There are no branch delay slots, no exceptions and no multiply/divide.
//
// Interface: rst (synchronous, active high) clears PC, pipeline registers and
// registers. While rst is high, pm_load_we / dm_load_we write load_data into
// word load_addr of program / data memory. Debug outputs show the fetch PC,
// the write-back port, the stall/flush signals and the forwarding selects of
// the current cycle.
module mips2000
  import mips_pkg::*;
#(
  parameter int AW = 12                    // memory words = 2^AW (4K)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pm_load_we,
  input  logic          dm_load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data,
  output logic [31:0]   dbg_pc,
  output logic          dbg_wb_we,
  output logic [4:0]    dbg_wb_addr,
  output logic [31:0]   dbg_wb_data,
  output logic          dbg_stall,
  output logic          dbg_flush,
  output logic [1:0]    dbg_fwd_a,
  output logic [1:0]    dbg_fwd_b
);
  if_id_t  if_d, if_id;
  id_ex_t  id_d, id_ex;
  ex_mem_t ex_d, ex_mem;
  mem_wb_t mem_d, mem_wb;

  logic [31:0] pc, pc_plus4, instr, next_pc;
  logic        stall, flush;
  logic        wb_we;
  logic [4:0]  wb_addr;
  logic [31:0] wb_data;

  // ---------------- IF ----------------
  if_stage #(.AW(AW)) u_if (
    .clk, .rst, .hold(stall && !flush), .next_pc, .pc, .pc_plus4, .instr,
    .load_we(pm_load_we), .load_addr, .load_data);

  assign if_d = '{instr: instr, pc_plus4: pc_plus4};
  if_id_reg u_ifid (.clk, .clr(rst || flush), .hold(stall), .d(if_d), .q(if_id));

  // ---------------- ID ----------------
  id_stage u_id (.clk, .rst, .if_id, .id_ex_instr(id_ex.instr),
                 .wb_we, .wb_addr, .wb_data, .id_out(id_d), .stall);

  id_ex_reg u_idex (.clk, .clr(rst || flush || stall), .d(id_d), .q(id_ex));

  // ---------------- EX ----------------
  // what the instruction now in MEM will write (for forwarding)
  logic        mem_we;
  cdata_sel_e  mem_cds;
  caddr_sel_e  mem_cas;
  logic [4:0]  mem_rd;
  logic [31:0] mem_fwd_data;

  wb_controller u_mem_dec (.instr(ex_mem.instr), .we(mem_we), .cdata_sel(mem_cds), .caddr_sel(mem_cas));
  mux_n #(.WIDTH(5), .N(3)) u_mem_rd (
    .din({RA, f_rt(ex_mem.instr), f_rd(ex_mem.instr)}), .sel(mem_cas), .dout(mem_rd));
  mux_n #(.WIDTH(32), .N(2)) u_mem_fwd (
    .din({ex_mem.pc_plus4, ex_mem.alu}), .sel(mem_cds == CD_PC4), .dout(mem_fwd_data));

  ex_stage u_ex (.id_ex, .ex_mem_we(mem_we), .ex_mem_rd(mem_rd), .mem_fwd_data,
                 .mem_wb_we(wb_we), .mem_wb_rd(wb_addr), .wb_data,
                 .ex_out(ex_d), .fwd_a(dbg_fwd_a), .fwd_b(dbg_fwd_b));

  ex_mem_reg u_exmem (.clk, .clr(rst || flush), .d(ex_d), .q(ex_mem));

  // ---------------- MEM ----------------
  mem_stage #(.AW(AW)) u_mem (
    .clk, .ex_mem, .if_pc_plus4(pc_plus4), .mem_out(mem_d), .next_pc, .flush,
    .load_we(dm_load_we), .load_addr, .load_data);

  mem_wb_reg u_memwb (.clk, .clr(rst), .d(mem_d), .q(mem_wb));

  // ---------------- WB ----------------
  wb_stage u_wb (.mem_wb, .we(wb_we), .c_addr(wb_addr), .c_data(wb_data));

  assign dbg_pc      = pc;
  assign dbg_wb_we   = wb_we;
  assign dbg_wb_addr = wb_addr;
  assign dbg_wb_data = wb_data;
  assign dbg_stall   = stall;
  assign dbg_flush   = flush;
endmodule
