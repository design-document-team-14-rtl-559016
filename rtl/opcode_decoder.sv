// opcode_decoder: turns a 16-bit instruction into one of 23 operations.
//
// A 4-to-16 decoder on bits 15:12 selects the major opcode. Three of the
// opcodes stand for a group of operations that bits 9:8 tell apart, each
// with a small decoder of its own: INPUT (INPUTC, INPUTCF, INPUTD,
// INPUTDF), SHIFT (SHIFTL, SHIFTR; bit 8 only) and BRANCH (BRE, BRNE, BRG,
// BRGE). The result is a one-hot vector ops, indexed by op_e, so exactly
// one operation is active at a time. Bits 11:8 (register fields X and Y)
// are passed on to the control table alongside it.
// Purely combinational. The structure follows the design; the opcode
// numbers are those of i281_pkg.
//
// Lint note: instruction bits 7..0 (the immediate) do not take part in
// decoding; the whole instruction word is the input for clarity.
module opcode_decoder
  import i281_pkg::*;
(
  input  instr_t               instr,
  output logic [NUM_OPS-1:0]   ops,
  output logic [3:0]           xy
);
  logic [15:0] major;

  always_comb begin
    major = 16'b1 << instr.opcode;
    ops   = '0;
    ops[OP_NOOP]    = major[OPC_NOOP];
    ops[OP_INPUTC]  = major[OPC_INPUT] && (instr.ry == 2'b00);
    ops[OP_INPUTCF] = major[OPC_INPUT] && (instr.ry == 2'b01);
    ops[OP_INPUTD]  = major[OPC_INPUT] && (instr.ry == 2'b10);
    ops[OP_INPUTDF] = major[OPC_INPUT] && (instr.ry == 2'b11);
    ops[OP_MOVE]    = major[OPC_MOVE];
    ops[OP_LOADI]   = major[OPC_LOADI];
    ops[OP_ADD]     = major[OPC_ADD];
    ops[OP_ADDI]    = major[OPC_ADDI];
    ops[OP_SUB]     = major[OPC_SUB];
    ops[OP_SUBI]    = major[OPC_SUBI];
    ops[OP_LOAD]    = major[OPC_LOAD];
    ops[OP_LOADF]   = major[OPC_LOADF];
    ops[OP_STORE]   = major[OPC_STORE];
    ops[OP_STOREF]  = major[OPC_STOREF];
    ops[OP_SHIFTL]  = major[OPC_SHIFT] && !instr.ry[0];
    ops[OP_SHIFTR]  = major[OPC_SHIFT] &&  instr.ry[0];
    ops[OP_CMP]     = major[OPC_CMP];
    ops[OP_JUMP]    = major[OPC_JUMP];
    ops[OP_BRE]     = major[OPC_BRANCH] && (instr.ry == 2'b00);
    ops[OP_BRNE]    = major[OPC_BRANCH] && (instr.ry == 2'b01);
    ops[OP_BRG]     = major[OPC_BRANCH] && (instr.ry == 2'b10);
    ops[OP_BRGE]    = major[OPC_BRANCH] && (instr.ry == 2'b11);
    xy = {instr.rx, instr.ry};
  end

  always_comb assert final ($onehot(ops)) else $error("opcode_decoder: ops not one-hot");
endmodule
