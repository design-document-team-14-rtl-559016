// tb_user_panel: self-checking test of the front panel.
// Checks: reset; in Run the CPU enable equals the clock tick and debug
// strobes do nothing; in Halt no cycle happens without a strobe; a held
// single-step strobe gives exactly one CPU cycle; examine gives one cycle
// with a mock JUMP carrying sw_reg[7:0]; deposit gives one cycle with a
// mock INPUTC or INPUTD addressed by the PC; 60 random debug operations
// with random switch, PC and code/data settings; strobes are ignored while
// the reset switch is on; game mode is passed on.
module tb_user_panel;
  import i281_pkg::*;
  logic        clk = 0, run, game, rstsw, step, exam, dep, cd, tick;
  logic [15:0] sw;
  logic [7:0]  pc;
  logic        cpu_rst, cpu_en, running, inj_v, game_o;
  instr_t      inj_i;
  int checks = 0, failures = 0;
  int ncyc, ninj;
  instr_t last_inj;
  int tcount = 0;

  user_panel dut (.clk(clk), .sw_reg(sw), .run_sw(run), .game_mode_sw(game), .reset_sw(rstsw),
                  .step_sw(step), .examine_sw(exam), .deposit_sw(dep), .code_data_sw(cd),
                  .tick(tick), .pc(pc), .cpu_rst(cpu_rst), .cpu_en(cpu_en), .running(running),
                  .inject_valid(inj_v), .inject_instr(inj_i), .game_mode(game_o));

  always #5 clk = ~clk;
  // tick every fourth clock
  always @(posedge clk) tcount <= tcount + 1;
  assign tick = (tcount % 4 == 3);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Count CPU cycles and injected cycles over n clocks.
  task automatic watch(input int n);
    ncyc = 0; ninj = 0;
    repeat (n) begin
      @(negedge clk);
      if (cpu_en) ncyc++;
      if (inj_v) begin ninj++; last_inj = inj_i; end
    end
  endtask

  task automatic strobe(ref logic s);
    @(negedge clk); s = 1;
    fork watch(30); join_none
    repeat (15) @(negedge clk);
    s = 0;
    repeat (16) @(negedge clk);
  endtask

  initial begin
    sw = 16'h1234; pc = 8'h85; run = 0; game = 0; rstsw = 1; step = 0; exam = 0; dep = 0; cd = 0;
    repeat (6) @(negedge clk);
    check(cpu_rst && !cpu_en && !inj_v, "reset");
    rstsw = 0;
    repeat (4) @(negedge clk);
    check(!cpu_rst, "reset released");
    // Run mode
    run = 1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      check(cpu_en == tick && !inj_v, "run: enable follows tick");
    end
    check(running, "running flag");
    strobe(exam);
    check(ninj == 0, "examine ignored while running");
    // Halt mode
    run = 0;
    repeat (4) @(negedge clk);
    watch(40);
    check(ncyc == 0, "halted: no cycles");
    strobe(step);
    check(ncyc == 1 && ninj == 0, $sformatf("single step: %0d cycles %0d injected", ncyc, ninj));
    strobe(exam);
    check(ncyc == 1 && ninj == 1, "examine: one injected cycle");
    check(last_inj == 16'hE034, $sformatf("examine JUMP %h", last_inj));
    cd = 0;
    strobe(dep);
    check(ncyc == 1 && ninj == 1, "deposit code: one injected cycle");
    check(last_inj == 16'h1085, $sformatf("deposit INPUTC %h", last_inj));
    cd = 1; pc = 8'h07;
    repeat (4) @(negedge clk);
    strobe(dep);
    check(ncyc == 1 && ninj == 1, "deposit data: one injected cycle");
    check(last_inj == 16'h1207, $sformatf("deposit INPUTD %h", last_inj));
    // random debug operations while halted
    for (int n = 0; n < 60; n++) begin
      int kind;
      logic [15:0] exp_i;
      kind = $urandom_range(0, 2);
      sw = 16'($urandom); pc = 8'($urandom); cd = 1'($urandom);
      repeat (4) @(negedge clk);
      exp_i = (kind == 1) ? {4'hE, 4'h0, sw[7:0]} : {4'h1, 2'b00, cd ? 2'b10 : 2'b00, pc};
      if (kind == 0) strobe(step);
      else if (kind == 1) strobe(exam);
      else strobe(dep);
      check(ncyc == 1 && ninj == (kind == 0 ? 0 : 1),
            $sformatf("random op %0d: %0d cycles %0d injected", kind, ncyc, ninj));
      if (kind != 0)
        check(last_inj == exp_i, $sformatf("random op %0d: mock %h exp %h", kind, last_inj, exp_i));
    end
    // strobes have no effect while the reset switch is on
    rstsw = 1;
    repeat (4) @(negedge clk);
    strobe(step);
    check(ncyc == 0, "step ignored during reset");
    strobe(exam);
    check(ncyc == 0 && ninj == 0, "examine ignored during reset");
    rstsw = 0;
    repeat (4) @(negedge clk);
    game = 1;
    repeat (3) @(negedge clk);
    check(game_o, "game mode passed on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
