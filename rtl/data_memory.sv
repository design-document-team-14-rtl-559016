// data_memory: the byte-wide data memory of the i281.
//
// DMEM_BYTES bytes, one combinational read port and one write port. The
// byte at addr is always on dout; on a rising clock edge with en and
// write_en (c17, DMEM_WRITE_ENABLE) high, din is written at addr. A write
// is visible on dout after the edge. The address comes from the ALU result
// multiplexer (c15) and the data from the DMEM input multiplexer (c16),
// both outside this block. Size 128 bytes follows the design; the memory
// is not cleared by reset (the BIOS clears it).
module data_memory #(
  parameter int unsigned DMEM_BYTES = 128,
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned ADDR_W     = $clog2(DMEM_BYTES)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              write_en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  din,
  output logic [WIDTH-1:0]  dout
);
  logic [WIDTH-1:0] mem [DMEM_BYTES];

  assign dout = (int'(addr) < DMEM_BYTES) ? mem[addr] : '0;

  always_ff @(posedge clk) begin
    if (en && write_en && (int'(addr) < DMEM_BYTES)) mem[addr] <= din;
  end
endmodule
