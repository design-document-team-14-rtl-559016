// pc_update_logic: next-program-counter logic.
//
// Two adders and a multiplexer. The first adder adds the constant 1 to
// the current PC (carry-in grounded) to give PC+1. The second adder adds
// the low PC_WIDTH bits of the instruction (its 8-bit immediate, a two's
// complement offset) to PC+1, carry-in grounded. The multiplexer controlled
// by c2 (PROGRAM_COUNTER_MUX) passes PC+1 when c2 = 0 and PC+1+offset when
// c2 = 1. All arithmetic wraps modulo 2^PC_WIDTH.
// Purely combinational. The design widened this path from six to eight
// bits; both adders and the mux follow its drawing.
module pc_update_logic #(
  parameter int unsigned PC_WIDTH = 8
) (
  input  logic [PC_WIDTH-1:0] pc,
  input  logic [PC_WIDTH-1:0] offset,
  input  logic                pc_mux,
  output logic [PC_WIDTH-1:0] pc_next
);
  logic [PC_WIDTH-1:0] pc_inc, pc_branch;

  assign pc_inc    = pc + PC_WIDTH'(1);
  assign pc_branch = pc_inc + offset;

  mux2 #(.WIDTH(PC_WIDTH)) u_pc_mux (.sel(pc_mux), .u(pc_inc), .v(pc_branch), .z(pc_next));
endmodule
