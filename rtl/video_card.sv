// video_card: memory-mapped display of data memory bytes 0..NDIGITS-1 on
// eight 7-segment displays.
//
// The card watches the data-memory write port. When a byte is written to
// an address below NDIGITS, the card stores its own copy of it (the data
// memory stores it as well); a digit therefore changes only when the CPU
// writes its byte. Each stored byte drives one display, in one of two
// formats chosen by the game-mode switch:
//   game_mode = 0: the low four bits as a hexadecimal digit;
//   game_mode = 1: each bit drives one segment (bit 0 = a ... bit 6 = g,
//                  bit 7 = decimal point), so programs can draw freely.
// seg[i] is {dp, g, f, e, d, c, b, a}, 1 = lit, for digit i; it follows the
// stored bytes and game_mode combinationally. Writes take effect on the
// rising clock edge. The write snooping and both display formats follow
// the design; the segment bit order and active-high outputs, and clearing
// the copies on reset, are this implementation's choices.
module video_card #(
  parameter int unsigned NDIGITS = 8,
  parameter int unsigned ADDR_W  = 7,
  parameter int unsigned WIDTH   = 8
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           en,
  input  logic                           write_en,
  input  logic [ADDR_W-1:0]              addr,
  input  logic [WIDTH-1:0]               din,
  input  logic                           game_mode,
  output logic [NDIGITS-1:0][WIDTH-1:0]  bytes,
  output logic [NDIGITS-1:0][7:0]        seg
);
  logic [NDIGITS-1:0][6:0] hex_seg;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NDIGITS; i++) begin
      if (rst) bytes[i] <= '0;
      else if (en && write_en && (int'(addr) == i)) bytes[i] <= din;
    end
  end

  for (genvar i = 0; i < NDIGITS; i++) begin : g_digit
    hex7seg u_hex (.nibble(bytes[i][3:0]), .seg(hex_seg[i]));
    assign seg[i] = game_mode ? bytes[i][7:0] : {1'b0, hex_seg[i]};
  end

  initial assert (WIDTH >= 8) else $error("video_card: game mode needs 8-bit bytes");
endmodule
