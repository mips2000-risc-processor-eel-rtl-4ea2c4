// mem_stage: memory access and next-PC selection.
//
// The EX/MEM result addresses the data memory. MEM_Writer prepares store
// data and byte enables; MEM_Reader shapes the read word into the load value
// (lmd), which goes on to MEM/WB. NextPC_Gen and a 4-input multiplexer choose
// the next PC among the fetch stage's PC+4, the jump address
// {PC+4[31:28], target, 00}, the branch target and the register value (A),
// and raise flush when the choice is not PC+4. While load_we is high (core in
// reset) the data memory is written through the load port instead, word by
// word; that port is this design's. Combinational except for the memory
// write on the clock edge.
module mem_stage
  import mips_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic          clk,
  input  ex_mem_t       ex_mem,
  input  logic [31:0]   if_pc_plus4,
  output mem_wb_t       mem_out,
  output logic [31:0]   next_pc,
  output logic          flush,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);
  logic [3:0]  st_be, be;
  logic [31:0] st_data, wdata, addr, rdata, lmd, jump_addr;
  npc_sel_e    sel;

  mem_writer u_wr (.opcode(f_opcode(ex_mem.instr)), .addr_lo(ex_mem.alu[1:0]), .rt_data(ex_mem.b),
                   .be(st_be), .wdata(st_data));

  always_comb begin
    if (load_we) begin
      addr  = {{(30-AW){1'b0}}, load_addr, 2'b00};
      be    = 4'b1111;
      wdata = load_data;
    end else begin
      addr  = ex_mem.alu;
      be    = st_be;
      wdata = st_data;
    end
  end

  data_mem #(.AW(AW)) u_dmem (.clk, .addr, .be, .wdata, .rdata);

  mem_reader u_rd (.opcode(f_opcode(ex_mem.instr)), .addr_lo(ex_mem.alu[1:0]), .word(rdata),
                   .rt_data(ex_mem.b), .ldata(lmd));

  nextpc_gen u_npc (.instr(ex_mem.instr), .cond(ex_mem.cond), .sel, .flush);

  assign jump_addr = {ex_mem.pc_plus4[31:28], ex_mem.instr[25:0], 2'b00};

  mux_n #(.WIDTH(32), .N(4)) u_npc_mux (
    .din({ex_mem.a, ex_mem.branch, jump_addr, if_pc_plus4}), .sel(sel), .dout(next_pc));

  always_comb begin
    mem_out.instr    = ex_mem.instr;
    mem_out.pc_plus4 = ex_mem.pc_plus4;
    mem_out.alu      = ex_mem.alu;
    mem_out.lmd      = lmd;
  end
endmodule
