// if_stage: instruction fetch.
//
// The PC register addresses the program memory; pc_inc forms PC+4. The PC
// loads next_pc, the value the MEM stage's Next PC Source Selector chooses
// (PC+4 of this stage when no branch/jump is taken), except while hold
// (load-use stall) is high. rst clears the PC to 0. Fetch is combinational:
// instr and pc_plus4 belong to the current PC and are captured by IF/ID at
// the next edge.
module if_stage #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hold,
  input  logic [31:0]   next_pc,
  output logic [31:0]   pc,
  output logic [31:0]   pc_plus4,
  output logic [31:0]   instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);
  prog_cntr #(.WIDTH(32)) u_pc (.clk, .clr(rst), .hold, .d(next_pc), .q(pc));
  pc_inc u_inc (.pc, .pc_plus4);
  prog_mem #(.AW(AW)) u_pmem (.clk, .addr(pc), .instr, .load_we, .load_addr, .load_data);
endmodule
