// data_mem: data RAM, 2^AW x 32 (4K words by default).
//
// Four byte-wide arrays, one per byte lane, each with its own write enable
// (be[3] = bits 31:24, the lowest byte address in big-endian order), so the
// smallest writable unit is a byte. The word address is byte-address bits
// [AW+1:2]. Reads are asynchronous; writes happen on the rising clock edge.
// The lane structure follows the document; the read timing is this design's
// choice.
module data_mem #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  input  logic [3:0]    be,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  localparam int DEPTH = 1 << AW;
  logic [7:0] ram3 [DEPTH];   // bits 31:24, lowest byte address
  logic [7:0] ram2 [DEPTH];
  logic [7:0] ram1 [DEPTH];
  logic [7:0] ram0 [DEPTH];   // bits 7:0
  logic [AW-1:0] wa;
  assign wa = addr[AW+1:2];

  always_ff @(posedge clk) if (be[3]) ram3[wa] <= wdata[31:24];
  always_ff @(posedge clk) if (be[2]) ram2[wa] <= wdata[23:16];
  always_ff @(posedge clk) if (be[1]) ram1[wa] <= wdata[15:8];
  always_ff @(posedge clk) if (be[0]) ram0[wa] <= wdata[7:0];

  assign rdata = {ram3[wa], ram2[wa], ram1[wa], ram0[wa]};
endmodule
