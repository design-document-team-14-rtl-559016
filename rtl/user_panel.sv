// user_panel: the front panel of the i281, the user's way into the machine.
//
// Controls:
//   sw_reg[15:0]  switch register, data for INPUTC/INPUTD and the panel
//   run_sw        1 = Run (the CPU advances on every clock-module tick),
//                 0 = Halt (the CPU stops; the debug switches work)
//   game_mode_sw  display format of the video card, passed on
//   reset_sw      puts the processor back into its boot state
//   step_sw       strobe: one CPU cycle on the instruction at the PC
//   examine_sw    strobe: one CPU cycle on a mock JUMP whose offset is
//                 sw_reg[7:0], so PC <= PC + 1 + sw_reg[7:0]
//   deposit_sw    strobe: one CPU cycle on a mock INPUTC (code_data_sw = 0)
//                 or INPUTD (code_data_sw = 1) whose address is the PC, so
//                 the switch register is stored at the PC and PC <= PC + 1
// The debug strobes act on their rising edge and only while halted. For a
// mocked instruction the panel raises inject_valid, and the code memory
// lets go of the instruction bus for that cycle.
//
// Timing: every switch is synchronised through two flip-flops. A strobe
// edge gives, two to three clocks later, exactly one clock with cpu_en = 1
// (plus inject_valid for examine/deposit). While running, cpu_en equals
// the clock module's tick. cpu_rst follows reset_sw after synchronisation.
//
// The set of switches and what each does follows the design, including the
// mocking of JUMP/INPUTC/INPUTD. That the switches are already debounced,
// that deposit addresses memory by the PC value as its immediate, and the
// code/data polarity are this implementation's choices.
//
// Lint note: only switch bits 7..0 reach the mock instructions, and the
// edge detector keeps previous values only of the strobe switches, so the
// other synchronised bits are unused by design.
module user_panel
  import i281_pkg::*;
#(
  parameter int unsigned PC_WIDTH = 8
) (
  input  logic                clk,
  input  logic [INSTR_W-1:0]  sw_reg,
  input  logic                run_sw,
  input  logic                game_mode_sw,
  input  logic                reset_sw,
  input  logic                step_sw,
  input  logic                examine_sw,
  input  logic                deposit_sw,
  input  logic                code_data_sw,
  input  logic                tick,
  input  logic [PC_WIDTH-1:0] pc,
  output logic                cpu_rst,
  output logic                cpu_en,
  output logic                running,
  output logic                inject_valid,
  output instr_t              inject_instr,
  output logic                game_mode
);
  typedef struct packed {
    logic run;
    logic game;
    logic rst;
    logic step;
    logic exam;
    logic dep;
    logic data;
  } sw_t;

  sw_t  sync1, sync2, prev;
  logic step_q;
  logic rise_step, rise_exam, rise_dep;

  always_ff @(posedge clk) begin
    sync1 <= '{run: run_sw, game: game_mode_sw, rst: reset_sw, step: step_sw,
               exam: examine_sw, dep: deposit_sw, data: code_data_sw};
    sync2 <= sync1;
    prev  <= sync2;
  end

  assign rise_step = sync2.step && !prev.step;
  assign rise_exam = sync2.exam && !prev.exam;
  assign rise_dep  = sync2.dep  && !prev.dep;

  always_ff @(posedge clk) begin
    if (sync2.rst) begin
      step_q       <= 1'b0;
      inject_valid <= 1'b0;
      inject_instr <= '0;
    end else begin
      step_q       <= 1'b0;
      inject_valid <= 1'b0;
      if (!sync2.run) begin
        if (rise_step) begin
          step_q <= 1'b1;
        end else if (rise_exam) begin
          step_q       <= 1'b1;
          inject_valid <= 1'b1;
          inject_instr <= mk_instr(OPC_JUMP, 2'b00, 2'b00, sw_reg[7:0]);
        end else if (rise_dep) begin
          step_q       <= 1'b1;
          inject_valid <= 1'b1;
          inject_instr <= mk_instr(OPC_INPUT, 2'b00, sync2.data ? 2'b10 : 2'b00,
                                   8'(pc));
        end
      end
    end
  end

  assign cpu_rst   = sync2.rst;
  assign running   = sync2.run;
  assign cpu_en    = !sync2.rst && ((sync2.run && tick) || step_q);
  assign game_mode = sync2.game;

  // A mocked instruction is only ever presented for a cycle the CPU
  // executes. Checked once the reset switch has been used, since the state
  // before the first reset is undefined.
  logic reset_seen;
  always_ff @(posedge clk) begin
    if (sync2.rst) reset_seen <= 1'b1;
    else if (reset_seen && inject_valid)
      assert (cpu_en) else $error("user_panel: injection without a CPU cycle");
  end
endmodule
