// mux2: WIDTH-bit 2-to-1 multiplexer, the basic interconnect block of the
// CPU (one per select line c11, c15, c16, c18 and the PC mux c2).
// Each output bit Z[i] is U[i] when sel is 0 and V[i] when sel is 1, built
// as WIDTH one-bit 2-to-1 multiplexers sharing one select line.
// Purely combinational. Width 8 follows the design; it is a parameter so the
// same block also serves the 16-bit and PC-wide paths.
module mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] u,
  input  logic [WIDTH-1:0] v,
  output logic [WIDTH-1:0] z
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++) z[i] = sel ? v[i] : u[i];
  end
endmodule
