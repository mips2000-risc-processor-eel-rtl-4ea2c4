// ex_stage: execute.
//
// The forwarding unit picks each operand from the ID/EX register, the
// EX/MEM result (mem_fwd_data) or the MEM/WB write-back data (wb_data) through
// two 3-input multiplexers. The B operand of the ALU 32 Turbo is the
// forwarded register or the extended immediate; the barrel shifter shifts the
// forwarded rt by the shamt field or by rs[4:0]; a result multiplexer picks
// ALU or shifter. The Branch Address Generator forms PC+4 + offset*4. The
// forwarded A and B travel on to MEM (jr target, store data). Combinational;
// ex_out is the next EX/MEM contents.
module ex_stage
  import mips_pkg::*;
(
  input  id_ex_t      id_ex,
  input  logic        ex_mem_we,
  input  logic [4:0]  ex_mem_rd,
  input  logic [31:0] mem_fwd_data,
  input  logic        mem_wb_we,
  input  logic [4:0]  mem_wb_rd,
  input  logic [31:0] wb_data,
  output ex_mem_t     ex_out,
  output logic [1:0]  fwd_a,
  output logic [1:0]  fwd_b
);
  ex_ctrl_t    ctrl;
  logic [31:0] a_fwd, b_fwd, alu_b, alu_res, sh_res, result, branch;
  logic [4:0]  shamt;
  logic        zero, cond;

  ex_controller u_ctrl (.instr(id_ex.instr), .ctrl);

  forwarding_unit u_fwd (
    .id_ex_rs(f_rs(id_ex.instr)), .id_ex_rt(f_rt(id_ex.instr)),
    .ex_mem_we, .ex_mem_rd, .mem_wb_we, .mem_wb_rd, .fwd_a, .fwd_b
  );

  mux_n #(.WIDTH(32), .N(3)) u_fwd_a (.din({mem_fwd_data, wb_data, id_ex.a}), .sel(fwd_a), .dout(a_fwd));
  mux_n #(.WIDTH(32), .N(3)) u_fwd_b (.din({mem_fwd_data, wb_data, id_ex.b}), .sel(fwd_b), .dout(b_fwd));
  mux_n #(.WIDTH(32), .N(2)) u_bsel  (.din({id_ex.imm, b_fwd}), .sel(ctrl.b_imm), .dout(alu_b));
  mux_n #(.WIDTH(5),  .N(2)) u_shsel (.din({a_fwd[4:0], f_shamt(id_ex.instr)}), .sel(ctrl.sh_var), .dout(shamt));

  alu32_turbo u_alu (.a(a_fwd), .b(alu_b), .op(ctrl.alu_op), .result(alu_res), .zero, .cond);

  barrel_shifter u_sh (.din(b_fwd), .shamt, .left(ctrl.sh_left), .arith(ctrl.sh_arith), .dout(sh_res));

  mux_n #(.WIDTH(32), .N(2)) u_rsel (.din({sh_res, alu_res}), .sel(ctrl.use_shift), .dout(result));

  branch_addr_gen u_bag (.pc_plus4(id_ex.pc_plus4), .imm(id_ex.imm), .branch);

  always_comb begin
    ex_out.instr    = id_ex.instr;
    ex_out.pc_plus4 = id_ex.pc_plus4;
    ex_out.alu      = result;
    ex_out.a        = a_fwd;
    ex_out.b        = b_fwd;
    ex_out.cond     = cond;
    ex_out.branch   = branch;
  end
endmodule
