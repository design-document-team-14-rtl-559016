// i281_pkg: types and constants shared by the i281 CPU.
//
// The i281 is an 8-bit single-cycle CPU with 16-bit instructions and four
// general registers A-D. An instruction is split into four fields:
//   [15:12] opcode, [11:10] register X, [9:8] register Y (or a sub-operation
//   code for the INPUT, SHIFT and BRANCH groups), [7:0] 8-bit immediate.
// The opcode decoder turns an instruction into one of 23 operations; the
// control table turns the operation into eighteen control lines c1..c18,
// bundled here as ctrl_t in the order c1 (most significant) .. c18.
//
// The operation list, the 18 control-line names and the flag order
// (bit 0 zero, 1 negative, 2 overflow, 3 carry) follow the design. The
// numeric opcode values are this implementation's choice: opcodes are
// numbered in the order the operations are listed in the control table,
// with the three two-bit sub-operation groups sharing one opcode each.
package i281_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned INSTR_W = 16;
  localparam int unsigned PC_W    = 8;
  localparam int unsigned NUM_OPS = 23;

  // Four-bit major opcodes (instruction bits 15:12).
  typedef enum logic [3:0] {
    OPC_NOOP   = 4'h0,
    OPC_INPUT  = 4'h1,  // [9:8] 00 INPUTC, 01 INPUTCF, 10 INPUTD, 11 INPUTDF
    OPC_MOVE   = 4'h2,
    OPC_LOADI  = 4'h3,  // LOADI / LOADP
    OPC_ADD    = 4'h4,
    OPC_ADDI   = 4'h5,
    OPC_SUB    = 4'h6,
    OPC_SUBI   = 4'h7,
    OPC_LOAD   = 4'h8,
    OPC_LOADF  = 4'h9,
    OPC_STORE  = 4'hA,
    OPC_STOREF = 4'hB,
    OPC_SHIFT  = 4'hC,  // [8] 0 SHIFTL, 1 SHIFTR
    OPC_CMP    = 4'hD,
    OPC_JUMP   = 4'hE,
    OPC_BRANCH = 4'hF   // [9:8] 00 BRE/BRZ, 01 BRNE/BRNZ, 10 BRG, 11 BRGE
  } opcode_e;

  // The 23 decoded operations; the value is the bit index in the one-hot
  // operation vector produced by the opcode decoder.
  typedef enum logic [4:0] {
    OP_NOOP, OP_INPUTC, OP_INPUTCF, OP_INPUTD, OP_INPUTDF, OP_MOVE, OP_LOADI,
    OP_ADD, OP_ADDI, OP_SUB, OP_SUBI, OP_LOAD, OP_LOADF, OP_STORE, OP_STOREF,
    OP_SHIFTL, OP_SHIFTR, OP_CMP, OP_JUMP, OP_BRE, OP_BRNE, OP_BRG, OP_BRGE
  } op_e;

  typedef struct packed {
    opcode_e     opcode;
    logic [1:0]  rx;
    logic [1:0]  ry;
    logic [7:0]  imm;
  } instr_t;

  // Flag register word: F3 carry, F2 overflow, F1 negative, F0 zero.
  typedef struct packed {
    logic cf;
    logic of;
    logic nf;
    logic zf;
  } flags_t;

  // ALU_SELECT1/ALU_SELECT0 modes.
  typedef enum logic [1:0] {
    ALU_SHIFTL = 2'b00,
    ALU_SHIFTR = 2'b01,
    ALU_ADD    = 2'b10,
    ALU_SUB    = 2'b11
  } alu_sel_e;

  // Control lines c1..c18.
  typedef struct packed {
    logic       inmem_we;     // c1  INMEM_WRITE_ENABLE
    logic       pc_mux;       // c2  PROGRAM_COUNTER_MUX (1: PC+1+offset)
    logic       pc_we;        // c3  PROGRAM_COUNTER_WRITE_ENABLE
    logic [1:0] p0_sel;       // c4,c5 REGISTERS_PORT0_SELECT1/0
    logic [1:0] p1_sel;       // c6,c7 REGISTERS_PORT1_SELECT1/0
    logic [1:0] wr_sel;       // c8,c9 REGISTERS_WRITE_SELECT1/0
    logic       reg_we;       // c10 REGISTERS_WRITE_ENABLE
    logic       alu_src;      // c11 ALU_SOURCE_MUX (1: immediate)
    alu_sel_e   alu_sel;      // c12,c13 ALU_SELECT1/0
    logic       flags_we;     // c14 FLAGS_WRITE_ENABLE
    logic       alu_res_mux;  // c15 ALU_RESULT_MUX (1: immediate)
    logic       dmem_in_mux;  // c16 DMEM_INPUT_MUX (1: switch register)
    logic       dmem_we;      // c17 DMEM_WRITE_ENABLE
    logic       wb_mux;       // c18 REG_WRITEBACK_MUX (1: data memory)
  } ctrl_t;

  function automatic instr_t mk_instr(opcode_e opc, logic [1:0] rx, logic [1:0] ry,
                                      logic [7:0] imm);
    instr_t i;
    i.opcode = opc;
    i.rx     = rx;
    i.ry     = ry;
    i.imm    = imm;
    return i;
  endfunction

endpackage
