// control_table: produces the eighteen control lines c1..c18 for the
// operation being executed.
//
// Inputs are the one-hot operation vector from the opcode decoder, the
// register fields X (bits 11:10) and Y (bits 9:8) of the instruction, and
// the flag register. Each operation has one fixed row of the table; where
// the row holds a register field, that field is copied into the select
// pair (X or Y into the port-0, port-1 or write select). The PC-mux line of
// the four conditional branches is the branch condition, evaluated on the
// flags left by the previous flag-setting instruction (normally CMP):
//   BRE/BRZ  ZF          BRNE/BRNZ  !ZF
//   BRG      !ZF && NF == OF        BRGE  NF == OF   (signed X > / >= Y)
// In hardware the table is an EPROM; here it is a case statement over the
// operation index, so it is combinational and settles in the same cycle.
//
// Rows follow the design's control-line table, with three readings of
// ours: SHIFTR sets ALU_SELECT0 (not ALU_RESULT_MUX), INPUTD sets
// ALU_RESULT_MUX, DMEM_INPUT_MUX and DMEM_WRITE_ENABLE, and INPUTC sets
// ALU_RESULT_MUX so that its immediate is the code-memory address. The
// branch conditions are this implementation's choice.
//
// Lint note: the carry flag is an input but no branch condition uses it;
// it is wired in so all four flags reach the table as in the design.
module control_table
  import i281_pkg::*;
(
  input  logic [NUM_OPS-1:0] ops,
  input  logic [3:0]         xy,
  input  flags_t             flags,
  output ctrl_t              ctrl
);
  logic [1:0] x, y;
  op_e        op;
  logic       signed_ge;

  assign x = xy[3:2];
  assign y = xy[1:0];
  assign signed_ge = (flags.nf == flags.of);

  // One-hot to index encoder.
  always_comb begin
    op = OP_NOOP;
    for (int i = 0; i < NUM_OPS; i++)
      if (ops[i]) op = op_e'(i);
  end

  always_comb begin
    ctrl       = '0;
    ctrl.pc_we = 1'b1;  // every instruction advances the PC
    unique case (op)
      OP_NOOP: ;
      OP_INPUTC: begin
        ctrl.inmem_we = 1'b1; ctrl.alu_res_mux = 1'b1;
      end
      OP_INPUTCF: begin
        ctrl.inmem_we = 1'b1; ctrl.p0_sel = x; ctrl.alu_src = 1'b1; ctrl.alu_sel = ALU_ADD;
      end
      OP_INPUTD: begin
        ctrl.alu_res_mux = 1'b1; ctrl.dmem_in_mux = 1'b1; ctrl.dmem_we = 1'b1;
      end
      OP_INPUTDF: begin
        ctrl.p0_sel = x; ctrl.alu_src = 1'b1; ctrl.alu_sel = ALU_ADD;
        ctrl.dmem_in_mux = 1'b1; ctrl.dmem_we = 1'b1;
      end
      OP_MOVE: begin
        ctrl.p0_sel = y; ctrl.wr_sel = x; ctrl.reg_we = 1'b1;
        ctrl.alu_src = 1'b1; ctrl.alu_sel = ALU_ADD;
      end
      OP_LOADI: begin
        ctrl.wr_sel = x; ctrl.reg_we = 1'b1; ctrl.alu_res_mux = 1'b1;
      end
      OP_ADD: begin
        ctrl.p0_sel = x; ctrl.p1_sel = y; ctrl.wr_sel = x; ctrl.reg_we = 1'b1;
        ctrl.alu_sel = ALU_ADD; ctrl.flags_we = 1'b1;
      end
      OP_ADDI: begin
        ctrl.p0_sel = x; ctrl.wr_sel = x; ctrl.reg_we = 1'b1; ctrl.alu_src = 1'b1;
        ctrl.alu_sel = ALU_ADD; ctrl.flags_we = 1'b1;
      end
      OP_SUB: begin
        ctrl.p0_sel = x; ctrl.p1_sel = y; ctrl.wr_sel = x; ctrl.reg_we = 1'b1;
        ctrl.alu_sel = ALU_SUB; ctrl.flags_we = 1'b1;
      end
      OP_SUBI: begin
        ctrl.p0_sel = x; ctrl.wr_sel = x; ctrl.reg_we = 1'b1; ctrl.alu_src = 1'b1;
        ctrl.alu_sel = ALU_SUB; ctrl.flags_we = 1'b1;
      end
      OP_LOAD: begin
        ctrl.wr_sel = x; ctrl.reg_we = 1'b1; ctrl.alu_res_mux = 1'b1; ctrl.wb_mux = 1'b1;
      end
      OP_LOADF: begin
        ctrl.p0_sel = y; ctrl.wr_sel = x; ctrl.reg_we = 1'b1; ctrl.alu_src = 1'b1;
        ctrl.alu_sel = ALU_ADD; ctrl.wb_mux = 1'b1;
      end
      OP_STORE: begin
        ctrl.p1_sel = x; ctrl.alu_res_mux = 1'b1; ctrl.dmem_we = 1'b1;
      end
      OP_STOREF: begin
        ctrl.p0_sel = y; ctrl.p1_sel = x; ctrl.alu_src = 1'b1; ctrl.alu_sel = ALU_ADD;
        ctrl.dmem_we = 1'b1;
      end
      OP_SHIFTL: begin
        ctrl.p0_sel = x; ctrl.wr_sel = x; ctrl.reg_we = 1'b1;
        ctrl.alu_sel = ALU_SHIFTL; ctrl.flags_we = 1'b1;
      end
      OP_SHIFTR: begin
        ctrl.p0_sel = x; ctrl.wr_sel = x; ctrl.reg_we = 1'b1;
        ctrl.alu_sel = ALU_SHIFTR; ctrl.flags_we = 1'b1;
      end
      OP_CMP: begin
        ctrl.p0_sel = x; ctrl.p1_sel = y; ctrl.alu_sel = ALU_SUB; ctrl.flags_we = 1'b1;
      end
      OP_JUMP: ctrl.pc_mux = 1'b1;
      OP_BRE:  ctrl.pc_mux = flags.zf;
      OP_BRNE: ctrl.pc_mux = !flags.zf;
      OP_BRG:  ctrl.pc_mux = !flags.zf && signed_ge;
      OP_BRGE: ctrl.pc_mux = signed_ge;
      default: ;
    endcase
  end
endmodule
