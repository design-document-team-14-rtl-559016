// alu: the i281 arithmetic logic unit with its flag register.
//
// Operand a (port A) comes from register read port 0, operand b (port B)
// from the ALU source multiplexer. The shifter works on a only; the
// adder/subtractor on a and b. ALU_SELECT1/ALU_SELECT0 (c12, c13) choose:
//   00 SHIFTL, 01 SHIFTR, 10 ADD, 11 SUB/CMP.
// ALU_SELECT0 is both the shifter direction and the adder's add/sub line;
// ALU_SELECT1 picks the shifter (0) or adder (1) output as the result, the
// shifter's shift-out (0) or adder carry (1) as carry, and ground (0) or
// the adder overflow (1) as overflow. The flag calculator takes zero as a
// NOR of the eight result bits and negative as the result MSB. The four
// flags are loaded into the flag register when FLAGS_WRITE_ENABLE (c14).
//
// result and flags_next are combinational; flags is the registered value,
// updated on the rising clock edge (a single-cycle instruction sets the
// flags that the next instruction's branch reads). All of this follows the
// design; the flag register sits inside the ALU as in its hardware version.
//
// Lint note: the adder's own zero/negative outputs are left unconnected;
// the flags are computed from the selected result instead, as the design
// draws it, so they are also correct for shifts.
module alu
  import i281_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  alu_sel_e         sel,
  input  logic             flags_we,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output flags_t           flags_next,
  output flags_t           flags
);
  logic [WIDTH-1:0] shift_q, sum;
  logic             shift_out, add_carry, add_ovf;

  alu_shifter #(.WIDTH(WIDTH)) u_shifter (
    .sel(sel[0]), .din(a), .dout(shift_q), .shift_out(shift_out));

  alu_addsub #(.WIDTH(WIDTH)) u_addsub (
    .sub(sel[0]), .x(a), .y(b), .s(sum), .carry(add_carry), .overflow(add_ovf),
    .zero(), .negative());

  mux2 #(.WIDTH(WIDTH)) u_result_mux (.sel(sel[1]), .u(shift_q), .v(sum), .z(result));

  always_comb begin
    flags_next.cf = sel[1] ? add_carry : shift_out;
    flags_next.of = sel[1] ? add_ovf   : 1'b0;
    flags_next.nf = result[WIDTH-1];
    flags_next.zf = ~|result;
  end

  flag_register u_flags (.clk(clk), .rst(rst), .en(en), .write_en(flags_we),
                         .d(flags_next), .q(flags));
endmodule
