// if_id_reg: IF/ID pipeline register (instruction word and PC+4).
//
// On the rising edge: clr (reset or Flush_Pipeline) loads a NOP with PC+4 0;
// otherwise hold (load-use stall) keeps the contents; otherwise it captures
// d. Clear wins over hold, so a taken branch cancels a stalled instruction.
module if_id_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   clr,
  input  logic   hold,
  input  if_id_t d,
  output if_id_t q
);
  always_ff @(posedge clk) begin
    if (clr)        q <= '{instr: NOP, pc_plus4: '0};
    else if (!hold) q <= d;
  end
endmodule
