// prog_mem: instruction memory, DEPTH x 32, read asynchronously.
//
// As in the document it is four byte-wide arrays (upper, upper-middle,
// lower-middle, lower byte of the word), all addressed by byte-address bits
// [AW+1:2], so any address inside a word returns that whole word. Byte order is
// big-endian: the upper byte holds the lowest byte address.
// The original is a ROM filled from initialisation files; here a load port
// (load_we/load_addr/load_data, written on the clock edge) fills it while the
// core is held in reset. That port is this design's choice.
module prog_mem #(
  parameter int AW = 12              // 4K words
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);
  localparam int DEPTH = 1 << AW;

  logic [7:0] rom3 [DEPTH];  // upper byte
  logic [7:0] rom2 [DEPTH];
  logic [7:0] rom1 [DEPTH];
  logic [7:0] rom0 [DEPTH];  // lower byte

  logic [AW-1:0] waddr;
  assign waddr = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (load_we) begin
      rom3[load_addr] <= load_data[31:24];
      rom2[load_addr] <= load_data[23:16];
      rom1[load_addr] <= load_data[15:8];
      rom0[load_addr] <= load_data[7:0];
    end
  end

  assign instr = {rom3[waddr], rom2[waddr], rom1[waddr], rom0[waddr]};
endmodule
