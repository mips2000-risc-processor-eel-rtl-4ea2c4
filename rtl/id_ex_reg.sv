// id_ex_reg: ID/EX pipeline register (instruction, PC+4, register values A
// and B, extended immediate). On the rising edge clr (reset, flush, or a
// load-use stall, which inserts the bubble) loads all zeros, i.e. a NOP;
// otherwise it captures d.
module id_ex_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   clr,
  input  id_ex_t d,
  output id_ex_t q
);
  always_ff @(posedge clk) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
