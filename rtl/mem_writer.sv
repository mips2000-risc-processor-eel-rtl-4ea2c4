// mem_writer: the MEM_Writer unit.
//
// From the opcode of the instruction in MEM and the low two bits of its
// effective address it positions the store data (rt) on the byte lanes and
// raises the lane write enables. Big-endian: byte offset k of a word is lane
// 3-k. sb writes one lane, sh the half word at offset 0 or 2 (addr[0] is
// ignored), sw all four, swl the bytes from offset k to the end of the word
// with the high bytes of rt, swr the bytes from the start of the word to
// offset k with the low bytes of rt (MIPS R2000 semantics). Any other opcode
// writes nothing. Combinational.
module mem_writer
  import mips_pkg::*;
(
  input  logic [5:0]  opcode,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] rt_data,
  output logic [3:0]  be,
  output logic [31:0] wdata
);
  logic [4:0] k8;
  assign k8 = {addr_lo, 3'b000};

  always_comb begin
    be    = 4'b0000;
    wdata = rt_data;
    unique case (opcode)
      OP_SB: begin be = 4'b1000 >> addr_lo; wdata = {4{rt_data[7:0]}}; end
      OP_SH: begin be = addr_lo[1] ? 4'b0011 : 4'b1100; wdata = {2{rt_data[15:0]}}; end
      OP_SW: be = 4'b1111;
      OP_SWL: begin be = 4'b1111 >> addr_lo; wdata = rt_data >> k8; end
      OP_SWR: begin be = 4'b1111 << (2'd3 - addr_lo); wdata = rt_data << (5'd24 - k8); end
      default: be = 4'b0000;
    endcase
  end
endmodule
