// ex_mem_reg: EX/MEM pipeline register (instruction, PC+4, result, forwarded
// A and B, branch condition, branch target). On the rising edge clr (reset or
// flush) loads all zeros, a NOP that writes and branches nowhere; otherwise
// it captures d.
module ex_mem_reg
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    clr,
  input  ex_mem_t d,
  output ex_mem_t q
);
  always_ff @(posedge clk) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
