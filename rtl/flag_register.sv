// flag_register: the 4-bit flag register of the ALU.
//
// Loads the flags computed by the ALU on a rising clock edge when en and
// write_en (FLAGS_WRITE_ENABLE, c14) are high, and holds them otherwise.
// Bit order follows the design's final layout: F0 zero, F1 negative,
// F2 overflow, F3 carry. The synchronous reset to all-zero is this
// implementation's choice.
module flag_register
  import i281_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   write_en,
  input  flags_t d,
  output flags_t q
);
  always_ff @(posedge clk) begin
    if (rst)                 q <= '0;
    else if (en && write_en) q <= d;
  end
endmodule
