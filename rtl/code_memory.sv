// code_memory: the 16-bit instruction memory of the i281, split into a
// BIOS ROM and a user RAM, with the instruction-bus arbitration.
//
// Address map (PC_WIDTH = 8): words 0 .. ROM_WORDS-1 are the ROM that holds
// the BIOS; words ROM_WORDS .. ROM_WORDS+RAM_WORDS-1 are the RAM that holds
// the user program. The PC resets into the ROM, so the machine starts in
// BOOT mode (boot_mode = 1 while the PC points into the ROM) and enters RUN
// mode when the BIOS jumps into the RAM.
//
// Reading: instr is the word at pc, read combinationally. When the user
// panel asserts inject_valid, the memory releases the instruction bus and
// inject_instr is executed instead (examine and deposit).
//
// Writing (INPUTC/INPUTCF, c1 = INMEM_WRITE_ENABLE): the word wdata is
// written at waddr on the rising clock edge when en and write_en are high.
// Because the RAM is single-ported, the RAM cannot be written while it is
// also supplying the instruction: a write is carried out only when the
// instruction came from the ROM (BOOT mode) or from the user panel. In RUN
// mode the RAM is read-only and write_blocked flags a refused write.
// Writes to ROM addresses are ignored; the ROM is loaded only through the
// rom_prog_* port, which models the external EPROM programmer.
//
// The ROM/RAM split, the read-only RAM in RUN mode and the panel taking
// over the instruction bus follow the design; the address map (ROM in the
// lower half, 128 words each) and the programming port are this
// implementation's choices.
//
// Lint note: the top bit of the RAM-relative write offset is unused because
// the RAM index needs only log2(RAM_WORDS) bits.
module code_memory
  import i281_pkg::*;
#(
  parameter int unsigned PC_WIDTH  = 8,
  parameter int unsigned ROM_WORDS = 128,
  parameter int unsigned RAM_WORDS = 128
) (
  input  logic                clk,
  input  logic                en,
  // instruction fetch
  input  logic [PC_WIDTH-1:0] pc,
  input  logic                inject_valid,
  input  instr_t              inject_instr,
  output instr_t              instr,
  output logic                boot_mode,
  // write port (c1)
  input  logic                write_en,
  input  logic [PC_WIDTH-1:0] waddr,
  input  logic [INSTR_W-1:0]  wdata,
  output logic                write_blocked,
  // EPROM programmer
  input  logic                rom_prog_we,
  input  logic [PC_WIDTH-1:0] rom_prog_addr,
  input  logic [INSTR_W-1:0]  rom_prog_data
);
  localparam int unsigned ROM_AW = (ROM_WORDS > 1) ? $clog2(ROM_WORDS) : 1;
  localparam int unsigned RAM_AW = (RAM_WORDS > 1) ? $clog2(RAM_WORDS) : 1;

  logic [INSTR_W-1:0] rom [ROM_WORDS];
  logic [INSTR_W-1:0] ram [RAM_WORDS];

  logic               pc_in_rom, waddr_in_ram, write_allowed;
  logic [PC_WIDTH-1:0] ram_rd_off, ram_wr_off;
  logic [INSTR_W-1:0] mem_word;

  assign pc_in_rom    = (int'(pc) < ROM_WORDS);
  assign waddr_in_ram = (int'(waddr) >= ROM_WORDS) && (int'(waddr) < ROM_WORDS + RAM_WORDS);
  assign ram_rd_off   = pc - PC_WIDTH'(ROM_WORDS);
  assign ram_wr_off   = waddr - PC_WIDTH'(ROM_WORDS);
  assign boot_mode    = pc_in_rom;

  always_comb begin
    if (pc_in_rom)                               mem_word = rom[pc[ROM_AW-1:0]];
    else if (int'(ram_rd_off) < RAM_WORDS)       mem_word = ram[ram_rd_off[RAM_AW-1:0]];
    else                                         mem_word = '0;  // unmapped: NOOP
    instr = inject_valid ? inject_instr : instr_t'(mem_word);
  end

  // The RAM may be written only in a cycle in which it is not the
  // instruction source.
  assign write_allowed = pc_in_rom || inject_valid;
  assign write_blocked = en && write_en && waddr_in_ram && !write_allowed;

  always_ff @(posedge clk) begin
    if (en && write_en && waddr_in_ram && write_allowed)
      ram[ram_wr_off[RAM_AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rom_prog_we && (int'(rom_prog_addr) < ROM_WORDS))
      rom[rom_prog_addr[ROM_AW-1:0]] <= rom_prog_data;
  end

  initial assert (ROM_WORDS + RAM_WORDS <= (1 << PC_WIDTH))
    else $error("code_memory: ROM and RAM do not fit the PC address space");
endmodule
