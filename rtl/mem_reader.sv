// mem_reader: the MEM_Reader unit.
//
// Turns the word read from data memory into the value a load writes back,
// from the opcode and the low two address bits (big-endian byte order): lb /
// lbu pick one byte and sign / zero extend it, lh / lhu the half word at
// offset 0 or 2, lw the whole word. lwl and lwr (MIPS R2000 unaligned loads)
// merge the addressed bytes into the old value of rt, which arrives on
// rt_data. Other opcodes pass the word through. Combinational.
module mem_reader
  import mips_pkg::*;
(
  input  logic [5:0]  opcode,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] word,
  input  logic [31:0] rt_data,
  output logic [31:0] ldata
);
  logic [7:0]  byte_v;
  logic [15:0] half_v;
  logic [4:0]  k8;
  logic [31:0] keep;

  assign k8     = {addr_lo, 3'b000};
  assign byte_v = word[5'd24 - k8 +: 8];
  assign half_v = addr_lo[1] ? word[15:0] : word[31:16];

  always_comb begin
    keep  = '0;
    ldata = word;
    unique case (opcode)
      OP_LB:  ldata = {{24{byte_v[7]}}, byte_v};
      OP_LBU: ldata = {24'h0, byte_v};
      OP_LH:  ldata = {{16{half_v[15]}}, half_v};
      OP_LHU: ldata = {16'h0, half_v};
      OP_LWL: begin
        keep  = ~(32'hFFFF_FFFF << k8);
        ldata = (word << k8) | (rt_data & keep);
      end
      OP_LWR: begin
        keep  = ~(32'hFFFF_FFFF >> (5'd24 - k8));
        ldata = (word >> (5'd24 - k8)) | (rt_data & keep);
      end
      default: ldata = word;
    endcase
  end
endmodule
