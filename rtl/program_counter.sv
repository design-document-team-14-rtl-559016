// program_counter: the PC register.
//
// Loads pc_next on a rising clock edge when en (the CPU clock enable) and
// write_en (c3, PROGRAM_COUNTER_WRITE_ENABLE) are high, holds otherwise.
// The PC is 8 bits wide, as in the hardware version of the design. Reset
// loads RESET_PC, the first word of the BIOS ROM; the reset value and the
// synchronous reset are this implementation's choices.
module program_counter #(
  parameter int unsigned       PC_WIDTH = 8,
  parameter logic [PC_WIDTH-1:0] RESET_PC = '0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                write_en,
  input  logic [PC_WIDTH-1:0] pc_next,
  output logic [PC_WIDTH-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)                 pc <= RESET_PC;
    else if (en && write_en) pc <= pc_next;
  end
endmodule
