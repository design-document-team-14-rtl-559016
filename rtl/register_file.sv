// register_file: the four 8-bit general registers A, B, C, D.
//
// One write port and two read ports. On a rising clock edge with en and
// write_en (c10) high, the register chosen by write_sel (c8,c9) loads din;
// a 2-to-4 decoder with enable steers the write enable to exactly one
// register, each of which holds its value otherwise. Read port 0 (c4,c5)
// and read port 1 (c6,c7) are 4-to-1 multiplexers over the four registers,
// so both ports may show the same or different registers; reads are
// combinational and a write is seen on the ports after the clock edge.
// The register contents are also output for the orange register LEDs.
//
// The structure follows the design; the synchronous reset to zero and the
// en input (the CPU-wide clock enable from the user panel) are this
// implementation's choices.
module register_file #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NREGS = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   write_en,
  input  logic [1:0]             write_sel,
  input  logic [WIDTH-1:0]       din,
  input  logic [1:0]             p0_sel,
  input  logic [1:0]             p1_sel,
  output logic [WIDTH-1:0]       port0,
  output logic [WIDTH-1:0]       port1,
  output logic [NREGS-1:0][WIDTH-1:0] regs
);
  logic [NREGS-1:0] reg_we;

  // Decoder with enable: one write enable per register.
  always_comb begin
    for (int r = 0; r < NREGS; r++)
      reg_we[r] = en && write_en && (write_sel == 2'(r));
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < NREGS; r++) begin
      if (rst)            regs[r] <= '0;
      else if (reg_we[r]) regs[r] <= din;
    end
  end

  mux4 #(.WIDTH(WIDTH)) u_port0 (.sel(p0_sel), .a(regs[0]), .b(regs[1]), .c(regs[2]),
                                 .d(regs[3]), .p(port0));
  mux4 #(.WIDTH(WIDTH)) u_port1 (.sel(p1_sel), .a(regs[0]), .b(regs[1]), .c(regs[2]),
                                 .d(regs[3]), .p(port1));

  initial assert (NREGS == 4) else $error("register_file: two-bit selects need NREGS == 4");
endmodule
