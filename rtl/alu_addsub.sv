// alu_addsub: ripple-carry adder/subtractor of the ALU.
//
// Y is passed through an XOR with the add/sub line (ALU_SELECT0), and the
// same line is the carry into bit 0, so sub = 1 computes X + ~Y + 1 = X - Y.
// WIDTH full adders are chained (written as one addition); carry is the carry out of the last stage
// (c8 for 8 bits) and overflow is c7 XOR c8, the carry into the MSB stage
// against the carry out of it (not the sum bit S7). For subtraction carry
// therefore means "no borrow". Zero and negative of the sum are given for
// completeness; the ALU computes its flags from its selected result.
// Purely combinational; the structure follows the design.
module alu_addsub #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sub,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] s,
  output logic             carry,
  output logic             overflow,
  output logic             zero,
  output logic             negative
);
  logic [WIDTH-1:0] yx;
  logic             c_msb;   // carry into the MSB stage (c7 for 8 bits)

  // The chain of full adders, written as one addition: the carry into the
  // MSB stage is recovered from that stage's sum bit.
  always_comb begin
    yx                = y ^ {WIDTH{sub}};
    {carry, s}        = {1'b0, x} + {1'b0, yx} + {{WIDTH{1'b0}}, sub};
    c_msb             = s[WIDTH-1] ^ x[WIDTH-1] ^ yx[WIDTH-1];
    overflow          = carry ^ c_msb;
    zero              = ~|s;
    negative          = s[WIDTH-1];
  end
endmodule
