// mem_wb_reg: MEM/WB pipeline register (instruction, PC+4, result, load
// data). On the rising edge clr (reset only; an instruction in MEM has
// already resolved) loads all zeros, a NOP; otherwise it captures d.
module mem_wb_reg
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    clr,
  input  mem_wb_t d,
  output mem_wb_t q
);
  always_ff @(posedge clk) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
