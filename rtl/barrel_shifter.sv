// barrel_shifter: 32-bit shifter for sll, srl, sra and their variable forms.
//
// Five cascaded stages shift by 1, 2, 4, 8 and 16 places when the matching
// bit of shamt is set. Left shifts fill with zeros; right shifts fill with
// zeros, or with the sign bit when arith is high. The document gives the
// function (amount, arithmetic/logical, left/right); the log-stage structure
// is this design's. Combinational.
module barrel_shifter (
  input  logic [31:0] din,
  input  logic [4:0]  shamt,
  input  logic        left,
  input  logic        arith,
  output logic [31:0] dout
);
  logic fill;
  assign fill = arith && !left && din[31];

  always_comb begin
    logic [31:0] v;
    v = din;
    for (int k = 0; k < 5; k++) begin
      if (shamt[k]) begin
        if (left) v = v << (1 << k);
        else      v = (v >> (1 << k)) | ({32{fill}} << (32 - (1 << k)));
      end
    end
    dout = v;
  end
endmodule
