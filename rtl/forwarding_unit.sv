// forwarding_unit: chooses where each EX operand comes from.
//
// fwd_a (for rs) and fwd_b (for rt): 2'b10 takes the result of the
// instruction in MEM (EX/MEM), 2'b01 the write-back data of the instruction
// in WB (MEM/WB), 2'b00 the value read from the register array. MEM wins
// when both match, since it holds the newer result. A source of register 0
// is never forwarded. The document's conditions block the MEM/WB forward
// whenever the EX/MEM destination equals the source, even if the EX/MEM
// instruction writes nothing; here it is blocked only when the EX/MEM forward
// is actually taken. Combinational.
module forwarding_unit (
  input  logic [4:0] id_ex_rs,
  input  logic [4:0] id_ex_rt,
  input  logic       ex_mem_we,
  input  logic [4:0] ex_mem_rd,
  input  logic       mem_wb_we,
  input  logic [4:0] mem_wb_rd,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b
);
  function automatic logic [1:0] pick(input logic [4:0] src);
    if (ex_mem_we && ex_mem_rd != 5'd0 && ex_mem_rd == src)      return 2'b10;
    else if (mem_wb_we && mem_wb_rd != 5'd0 && mem_wb_rd == src) return 2'b01;
    else                                                          return 2'b00;
  endfunction

  assign fwd_a = pick(id_ex_rs);
  assign fwd_b = pick(id_ex_rt);
endmodule
