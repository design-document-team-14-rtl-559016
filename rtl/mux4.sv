// mux4: WIDTH-bit 4-to-1 multiplexer, used for the two read ports of the
// register file. sel = 00 passes a, 01 b, 10 c, 11 d; sel[1] is the
// SELECT1 line (c4 or c6) and sel[0] the SELECT0 line (c5 or c7).
// Built as WIDTH one-bit 4-to-1 multiplexers sharing the select lines.
// Purely combinational.
module mux4 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] p
);
  always_comb begin
    unique case (sel)
      2'b00: p = a;
      2'b01: p = b;
      2'b10: p = c;
      default: p = d;
    endcase
  end
endmodule
