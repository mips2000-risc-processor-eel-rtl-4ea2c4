// prog_cntr: the Program Counter, a plain register rather than a counter.
//
// On each rising clock edge it loads d, unless hold is high (pipeline stall:
// the PC keeps its value) or clr is high (synchronous clear to address 0).
// The document gives the register with synchronous clear and hold; letting
// clear win over hold is this design's choice.
module prog_cntr #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             hold,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)        q <= '0;
    else if (!hold) q <= d;
  end
endmodule
