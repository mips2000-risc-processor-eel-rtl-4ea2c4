// reg_array_32x32: the 32 x 32-bit general register file.
//
// Two combinational read ports (A, B) and one write port (C) written on the
// rising clock edge when we is high. When a read addresses the register being
// written in the same cycle, the write data is passed straight to the output,
// so an instruction in decode sees a result being written back in that cycle
// (as the document specifies). Register 0 always reads zero and ignores
// writes, and all registers clear on rst: both are this design's choices.
module reg_array_32x32 (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  a_addr,
  input  logic [4:0]  b_addr,
  output logic [31:0] a_data,
  output logic [31:0] b_data,
  input  logic        we,
  input  logic [4:0]  c_addr,
  input  logic [31:0] c_data
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && c_addr != 5'd0) begin
      regs[c_addr] <= c_data;
    end
  end

  function automatic logic [31:0] rd(input logic [4:0] a, input logic [31:0] stored,
                                     input logic w, input logic [4:0] wa, input logic [31:0] wd);
    if (a == 5'd0)          return '0;
    else if (w && wa == a)  return wd;
    else                    return stored;
  endfunction

  assign a_data = rd(a_addr, regs[a_addr], we, c_addr, c_data);
  assign b_data = rd(b_addr, regs[b_addr], we, c_addr, c_data);
endmodule
