// mux_n: N-input, WIDTH-bit multiplexer: dout = din[sel]. A select value
// with no input behind it (3 on a 3-input mux) gives input 0. Used for the
// ALU B source (2x32), shift-amount source (2x5), ALU/shifter result (2x32),
// forwarding (3x32), next PC (4x32), C-data (3x32) and C-address (3x5)
// selectors. Combinational.
module mux_n #(
  parameter int WIDTH = 32,
  parameter int N     = 2,
  localparam int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] din,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        dout
);
  always_comb begin
    if (int'(sel) < N) dout = din[sel];
    else               dout = din[0];
  end
endmodule
