// alu_shifter: one-place logical shifter of the ALU.
//
// Each output bit is a 2-to-1 multiplexer: with sel (ALU_SELECT0) low the
// input moves one place toward the MSB (O[i] = I[i-1], O[0] = 0), with sel
// high one place toward the LSB (O[i] = I[i+1], O[WIDTH-1] = 0). The bit
// shifted out, I[WIDTH-1] on a left shift and I[0] on a right shift, leaves
// on shift_out and becomes the carry flag for SHIFTL/SHIFTR.
// Purely combinational; the structure follows the design exactly.
module alu_shifter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,        // 0: left, 1: right
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             shift_out
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      if (sel) dout[i] = (i == WIDTH - 1) ? 1'b0 : din[(i + 1) % WIDTH];
      else     dout[i] = (i == 0)         ? 1'b0 : din[(i + WIDTH - 1) % WIDTH];
    end
    shift_out = sel ? din[0] : din[WIDTH-1];
  end
endmodule
