// i281_top: the complete i281 CPU with its front panel, clock and display.
//
// The i281 executes every instruction in one clock-enable cycle. The
// instruction at the PC is read from code memory, decoded into one of 23
// operations, and the control table sets the control lines c1..c18 that
// steer the datapath:
//   register file read port 0 (c4,c5) -> ALU operand A
//   read port 1 (c6,c7) or the immediate (c11) -> ALU operand B
//   ALU result or the immediate (c15) -> data/code-memory address and the
//     register write-back value
//   read port 1 or the switch register (c16) -> data-memory write data
//   c15 result or the data-memory byte (c18) -> register write (c8-c10)
//   PC+1 or PC+1+immediate (c2) -> PC (c3)
// Code-memory writes (c1) take the 16-bit switch register as data. The
// video card copies data-memory writes to bytes 0..7 onto eight 7-segment
// displays. The clock module ticks at the rotary switch's rate in RUN mode
// and at its fastest rate in BOOT mode. The user panel gates the clock
// enable (run, halt, single step)
// and can replace the fetched instruction with a mock one (examine,
// deposit). On reset the PC points at the BIOS ROM (BOOT mode); user
// programs run from code RAM, which is then read-only.
//
// Interface: clk is the 2 MHz oscillator; the panel switches, rotary speed
// switch and the EPROM programmer port are inputs. The outputs carry what
// the front LEDs show: PC, instruction, registers, flags, control lines,
// ALU result, BOOT/RUN mode, run/halt state and the display segments.
// The top is combinational from the PC and registers to every datapath
// value; all state changes on the rising clk edge when cpu_en is 1.
//
// Lint notes: flags_next (flags before the flag register) and the clock
// divider count are left unconnected here on purpose; they are kept as
// block outputs for testing. Control line c3 (PC write) is 1 for every
// operation in the control table, so that output bit is constant.
//
// The datapath and control follow the design. How the boot disk of example
// programs is read is not part of this block: programs reach code RAM
// through the BIOS (INPUTC from the switch register) or the panel.
module i281_top
  import i281_pkg::*;
#(
  parameter int unsigned ROM_WORDS  = 128,
  parameter int unsigned RAM_WORDS  = 128,
  parameter int unsigned DMEM_BYTES = 128,
  parameter int unsigned NDIGITS    = 8
) (
  input  logic                          clk,
  // front panel
  input  logic [INSTR_W-1:0]            sw_reg,
  input  logic                          run_sw,
  input  logic                          game_mode_sw,
  input  logic                          reset_sw,
  input  logic                          step_sw,
  input  logic                          examine_sw,
  input  logic                          deposit_sw,
  input  logic                          code_data_sw,
  input  logic [2:0]                    speed_sel,
  // EPROM programmer for the BIOS ROM
  input  logic                          rom_prog_we,
  input  logic [PC_W-1:0]               rom_prog_addr,
  input  logic [INSTR_W-1:0]            rom_prog_data,
  // visualisation
  output logic [NDIGITS-1:0][7:0]       seg,
  output logic [NDIGITS-1:0][DATA_W-1:0] video_bytes,
  output logic [PC_W-1:0]               pc,
  output instr_t                        instr,
  output logic [3:0][DATA_W-1:0]        regs,
  output flags_t                        flags,
  output ctrl_t                         ctrl,
  output logic [DATA_W-1:0]             alu_result,
  output logic                          boot_mode,
  output logic                          cpu_en,
  output logic                          running,
  output logic                          inmem_write_blocked
);
  localparam int unsigned DMEM_AW = $clog2(DMEM_BYTES);

  logic                 cpu_rst, tick, inject_valid, game_mode;
  instr_t               inject_instr;
  logic [NUM_OPS-1:0]   ops;
  logic [3:0]           xy;
  logic [DATA_W-1:0]    port0, port1, alu_b, res_mux, dmem_din, dmem_dout, wb_data;
  flags_t               flags_next;
  logic [PC_W-1:0]      pc_next;
  logic [11:0]          clk_count;

  clock_module u_clock (.clk(clk), .rst(cpu_rst), .speed_sel(speed_sel), .fast(boot_mode),
                        .tick(tick),
                        .count(clk_count));

  user_panel #(.PC_WIDTH(PC_W)) u_panel (
    .clk(clk), .sw_reg(sw_reg), .run_sw(run_sw), .game_mode_sw(game_mode_sw),
    .reset_sw(reset_sw), .step_sw(step_sw), .examine_sw(examine_sw),
    .deposit_sw(deposit_sw), .code_data_sw(code_data_sw), .tick(tick), .pc(pc),
    .cpu_rst(cpu_rst), .cpu_en(cpu_en), .running(running), .inject_valid(inject_valid),
    .inject_instr(inject_instr), .game_mode(game_mode));

  code_memory #(.PC_WIDTH(PC_W), .ROM_WORDS(ROM_WORDS), .RAM_WORDS(RAM_WORDS)) u_cmem (
    .clk(clk), .en(cpu_en), .pc(pc), .inject_valid(inject_valid),
    .inject_instr(inject_instr), .instr(instr), .boot_mode(boot_mode),
    .write_en(ctrl.inmem_we), .waddr(res_mux), .wdata(sw_reg),
    .write_blocked(inmem_write_blocked), .rom_prog_we(rom_prog_we),
    .rom_prog_addr(rom_prog_addr), .rom_prog_data(rom_prog_data));

  opcode_decoder u_dec (.instr(instr), .ops(ops), .xy(xy));

  control_table u_ctrl (.ops(ops), .xy(xy), .flags(flags), .ctrl(ctrl));

  register_file u_regs (
    .clk(clk), .rst(cpu_rst), .en(cpu_en), .write_en(ctrl.reg_we),
    .write_sel(ctrl.wr_sel), .din(wb_data), .p0_sel(ctrl.p0_sel), .p1_sel(ctrl.p1_sel),
    .port0(port0), .port1(port1), .regs(regs));

  mux2 #(.WIDTH(DATA_W)) u_alu_src_mux (.sel(ctrl.alu_src), .u(port1), .v(instr.imm),
                                        .z(alu_b));

  alu #(.WIDTH(DATA_W)) u_alu (
    .clk(clk), .rst(cpu_rst), .en(cpu_en), .sel(ctrl.alu_sel), .flags_we(ctrl.flags_we),
    .a(port0), .b(alu_b), .result(alu_result), .flags_next(flags_next), .flags(flags));

  mux2 #(.WIDTH(DATA_W)) u_alu_res_mux (.sel(ctrl.alu_res_mux), .u(alu_result),
                                        .v(instr.imm), .z(res_mux));

  mux2 #(.WIDTH(DATA_W)) u_dmem_in_mux (.sel(ctrl.dmem_in_mux), .u(port1),
                                        .v(sw_reg[DATA_W-1:0]), .z(dmem_din));

  data_memory #(.DMEM_BYTES(DMEM_BYTES), .WIDTH(DATA_W)) u_dmem (
    .clk(clk), .en(cpu_en), .write_en(ctrl.dmem_we), .addr(res_mux[DMEM_AW-1:0]),
    .din(dmem_din), .dout(dmem_dout));

  video_card #(.NDIGITS(NDIGITS), .ADDR_W(DMEM_AW), .WIDTH(DATA_W)) u_video (
    .clk(clk), .rst(cpu_rst), .en(cpu_en), .write_en(ctrl.dmem_we),
    .addr(res_mux[DMEM_AW-1:0]), .din(dmem_din), .game_mode(game_mode),
    .bytes(video_bytes), .seg(seg));

  mux2 #(.WIDTH(DATA_W)) u_wb_mux (.sel(ctrl.wb_mux), .u(res_mux), .v(dmem_dout),
                                   .z(wb_data));

  pc_update_logic #(.PC_WIDTH(PC_W)) u_pc_upd (.pc(pc), .offset(instr.imm),
                                               .pc_mux(ctrl.pc_mux), .pc_next(pc_next));

  program_counter #(.PC_WIDTH(PC_W)) u_pc (.clk(clk), .rst(cpu_rst), .en(cpu_en),
                                           .write_en(ctrl.pc_we), .pc_next(pc_next),
                                           .pc(pc));
endmodule
