// tb_i281_top: end-to-end test of the whole i281 at its default sizes.
//
// An instruction-level reference model of the i281, written here apart
// from the RTL, runs in lock step with the CPU: whenever the CPU's clock
// enable is high, the model fetches the same instruction from its own copy
// of the memories (or the mock instruction the panel is known to inject),
// executes it, and after the clock edge the PC, registers, flags and the
// video card's bytes are compared.
//
// The scenario:
//  1. The BIOS ROM is programmed with a boot program and the machine is
//     reset; it runs in BOOT mode at 1 MHz, although the speed switch is
//     at 250 kHz (the boot program always runs at full speed), and
//     exercises all ALU modes,
//     flags, loads and stores, branches taken and not taken, INPUTD/INPUTDF
//     and the video card.
//  2. The boot program copies a user program into code RAM with INPUTCF
//     and INPUTC; the testbench plays the part of the program source by
//     presenting each word on the switch register as it is read.
//  3. The boot program jumps into RAM (RUN mode). The user program runs at
//     the 250 kHz setting, tries to write code RAM (refused), writes the
//     display and ends in a JUMP-to-itself loop.
//  4. Halt; single step; examine and deposit into code memory and data
//     memory; run the deposited code.
//  5. Both display formats are checked, then reset.
// Every mechanism is counted and one that never happened is a failure.
module tb_i281_top;
  import i281_pkg::*;

  logic            clk = 0;
  logic [15:0]     sw_reg;
  logic            run_sw, game_sw, reset_sw, step_sw, exam_sw, dep_sw, cd_sw;
  logic [2:0]      speed_sel;
  logic            rom_we;
  logic [7:0]      rom_addr;
  logic [15:0]     rom_data;
  logic [7:0][7:0] seg, vbytes;
  logic [7:0]      pc;
  instr_t          instr;
  logic [3:0][7:0] regs;
  flags_t          flags;
  ctrl_t           ctrl;
  logic [7:0]      alu_result;
  logic            boot_mode, cpu_en, blocked, running;

  i281_top dut (
    .clk(clk), .sw_reg(sw_reg), .run_sw(run_sw), .game_mode_sw(game_sw), .reset_sw(reset_sw),
    .step_sw(step_sw), .examine_sw(exam_sw), .deposit_sw(dep_sw), .code_data_sw(cd_sw),
    .speed_sel(speed_sel), .rom_prog_we(rom_we), .rom_prog_addr(rom_addr),
    .rom_prog_data(rom_data), .seg(seg), .video_bytes(vbytes), .pc(pc), .instr(instr),
    .regs(regs), .flags(flags), .ctrl(ctrl), .alu_result(alu_result), .boot_mode(boot_mode),
    .cpu_en(cpu_en), .running(running), .inmem_write_blocked(blocked));

  always #250 clk = ~clk;  // 2 MHz oscillator

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, msg);
    end
  endtask

  // ---------------- reference model ----------------
  logic [15:0] m_rom [128];
  logic [15:0] m_ram [128];
  bit          m_ram_ok [128];
  logic [7:0]  m_dmem [128];
  logic [7:0]  m_reg [4];
  logic [7:0]  m_video [8];
  logic [7:0]  m_pc;
  bit          m_z, m_n, m_v, m_c;
  logic [15:0] user_prog [10];

  // mechanism counters
  int op_seen [23];
  int n_taken, n_not_taken, n_boot_to_run, n_blocked_model, n_blocked_dut;
  int n_exam, n_dep_code, n_dep_data, n_step, n_halt_idle, n_video_wr;
  int n_carry, n_ovf, n_game_chk, n_hex_chk, n_reset, n_run_boot, n_run_user;
  int n_rate_fast, n_rate_slow, n_rate_boot;

  typedef enum int {MOCK_NONE, MOCK_STEP, MOCK_EXAM, MOCK_DEP} mock_e;
  mock_e mock_pending = MOCK_NONE;
  bit    model_on = 0, cmp_pending = 0;

  function automatic logic [15:0] I(int opc, int x, int y, logic [7:0] imm);
    return 16'((opc << 12) | (x << 10) | (y << 8) | int'(imm));
  endfunction

  function automatic logic [15:0] m_fetch(logic [7:0] a);
    return (a < 128) ? m_rom[a[6:0]] : m_ram[a[6:0]];
  endfunction

  function automatic bit m_fetch_ok(logic [7:0] a);
    return (a < 128) ? 1'b1 : m_ram_ok[a[6:0]];
  endfunction

  // add or subtract with the i281 flag rules; returns the 8-bit result
  function automatic logic [7:0] m_arith(logic [7:0] a, logic [7:0] b, bit sub);
    int ua = int'(a), ub = int'(b), sa, sb, r, sr;
    sa = (ua > 127) ? ua - 256 : ua;
    sb = (ub > 127) ? ub - 256 : ub;
    if (sub) begin r = ua - ub; sr = sa - sb; m_c = (ua >= ub); end
    else     begin r = ua + ub; sr = sa + sb; m_c = (r > 255); end
    r = (r + 256) % 256;
    m_v = (sr > 127 || sr < -128);
    m_z = (r == 0); m_n = (r > 127);
    if (m_c) n_carry++;
    if (m_v) n_ovf++;
    return 8'(r);
  endfunction

  function automatic void m_dwrite(logic [7:0] addr, logic [7:0] d);
    m_dmem[addr[6:0]] = d;
    if (addr[6:0] < 8) begin m_video[addr[2:0]] = d; n_video_wr++; end
  endfunction

  // Execute one instruction; mock = it came from the panel.
  function automatic void m_exec(logic [15:0] w, logic [15:0] sw, bit mock);
    int opc = int'(w[15:12]), x = int'(w[11:10]), y = int'(w[9:8]);
    logic [7:0] imm = w[7:0], addr, r;
    logic [7:0] nxt = m_pc + 1;
    bit was_boot = (m_pc < 128);
    int opi;
    unique case (opc)
      0: opi = 0;
      1: begin
        opi = 1 + y;
        addr = (y[0]) ? m_reg[x] + imm : imm;
        if (y < 2) begin
          if (addr >= 128) begin
            if (was_boot || mock) begin m_ram[addr - 128] = sw; m_ram_ok[addr - 128] = 1; end
            else n_blocked_model++;
          end
        end else m_dwrite(addr, sw[7:0]);
      end
      2: begin opi = 5; m_reg[x] = m_reg[y] + imm; end
      3: begin opi = 6; m_reg[x] = imm; end
      4: begin opi = 7; m_reg[x] = m_arith(m_reg[x], m_reg[y], 0); end
      5: begin opi = 8; m_reg[x] = m_arith(m_reg[x], imm, 0); end
      6: begin opi = 9; m_reg[x] = m_arith(m_reg[x], m_reg[y], 1); end
      7: begin opi = 10; m_reg[x] = m_arith(m_reg[x], imm, 1); end
      8: begin opi = 11; m_reg[x] = m_dmem[imm[6:0]]; end
      9: begin opi = 12; addr = m_reg[y] + imm; m_reg[x] = m_dmem[addr[6:0]]; end
      10: begin opi = 13; m_dwrite(imm, m_reg[x]); end
      11: begin opi = 14; m_dwrite(m_reg[y] + imm, m_reg[x]); end
      12: begin
        opi = 15 + y[0];
        if (y[0]) begin m_c = m_reg[x][0]; r = m_reg[x] >> 1; end
        else      begin m_c = m_reg[x][7]; r = m_reg[x] << 1; end
        m_v = 0; m_z = (r == 0); m_n = r[7]; m_reg[x] = r;
        if (m_c) n_carry++;
      end
      13: begin opi = 17; void'(m_arith(m_reg[x], m_reg[y], 1)); end
      14: begin opi = 18; nxt = m_pc + 1 + imm; end
      default: begin
        bit t;
        opi = 19 + y;
        case (y)
          0: t = m_z;
          1: t = !m_z;
          2: t = !m_z && (m_n == m_v);
          default: t = (m_n == m_v);
        endcase
        if (t) begin nxt = m_pc + 1 + imm; n_taken++; end else n_not_taken++;
      end
    endcase
    op_seen[opi]++;
    m_pc = nxt;
    if (was_boot && m_pc >= 128) n_boot_to_run++;
    if (was_boot) n_run_boot++; else n_run_user++;
  endfunction

  // ---------------- lock-step checker ----------------
  logic [15:0] exp_w;
  bit          exp_mock;
  int          last_en = -1, cyc = 0;
  logic [2:0]  last_speed = 0;
  bit          last_boot = 0;

  always @(negedge clk) begin
    cyc++;
    if (cmp_pending) begin
      cmp_pending = 0;
      check(pc == m_pc, $sformatf("pc %h exp %h", pc, m_pc));
      for (int r = 0; r < 4; r++)
        check(regs[r] == m_reg[r], $sformatf("reg %0d %h exp %h", r, regs[r], m_reg[r]));
      check(flags == {m_c, m_v, m_n, m_z}, $sformatf("flags %b exp %b", flags, {m_c, m_v, m_n, m_z}));
      for (int i = 0; i < 8; i++)
        check(vbytes[i] == m_video[i], $sformatf("video %0d %h exp %h", i, vbytes[i], m_video[i]));
    end
    if (model_on && cpu_en) begin
      // clock rate while running: one instruction per tick of the chosen
      // speed in RUN mode, and of the fastest one in BOOT mode
      if (run_sw && last_en >= 0 && speed_sel == last_speed && boot_mode == last_boot) begin
        if (boot_mode) begin
          check(cyc - last_en == 2, "boot program at 1 MHz");
          if (speed_sel != 0) n_rate_boot++;
        end else if (speed_sel == 0) begin
          check(cyc - last_en == 2, "1 MHz instruction rate"); n_rate_fast++;
        end else if (speed_sel == 2) begin
          check(cyc - last_en == 8, "250 kHz instruction rate"); n_rate_slow++;
        end
      end
      last_en = cyc;
      last_speed = speed_sel;
      last_boot = boot_mode;
      exp_mock = 0;
      unique case (mock_pending)
        MOCK_EXAM: begin exp_w = I(14, 0, 0, sw_reg[7:0]); exp_mock = 1; n_exam++; end
        MOCK_DEP: begin
          exp_w = I(1, 0, cd_sw ? 2 : 0, m_pc); exp_mock = 1;
          if (cd_sw) n_dep_data++; else n_dep_code++;
        end
        default: begin
          exp_w = m_fetch(m_pc);
          if (mock_pending == MOCK_STEP) n_step++;
          // the testbench supplies the words the program reads from the switches
          if (exp_w[15:12] == 1) begin
            logic [7:0] a;
            a = exp_w[8] ? m_reg[exp_w[11:10]] + exp_w[7:0] : exp_w[7:0];
            if (exp_w[9]) sw_reg = 16'(8'hA0 + a);
            else sw_reg = (a >= 128 && a < 138) ? user_prog[a - 128] : 16'hBEEF;
          end
        end
      endcase
      mock_pending = MOCK_NONE;
      check(instr == exp_w, $sformatf("instruction %h exp %h at pc %h", instr, exp_w, m_pc));
      if (blocked) n_blocked_dut++;
      m_exec(exp_w, sw_reg, exp_mock);
      cmp_pending = 1;
    end else if (model_on && !run_sw && mock_pending == MOCK_NONE) begin
      n_halt_idle++;
      if (m_fetch_ok(m_pc)) check(instr == m_fetch(m_pc), "halted: instruction at PC shown");
    end
  end

  // ---------------- stimulus ----------------
  task automatic strobe(ref logic s, input mock_e kind);
    @(negedge clk);
    mock_pending = kind;
    s = 1;
    repeat (10) @(negedge clk);
    check(mock_pending == MOCK_NONE, "strobe produced one cycle");
    s = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic wait_pc(input logic [7:0] target, input int limit);
    int n = 0;
    while (m_pc != target && n < limit) begin @(negedge clk); n++; end
    check(m_pc == target, $sformatf("reached pc %h", target));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] boot [34];
    // user program, loaded into RAM 0x80.. by the boot program
    user_prog = '{
      I(3, 0, 0, 1),      // 80 LOADI A,1
      I(3, 1, 0, 0),      // 81 LOADI B,0
      I(4, 1, 0, 0),      // 82 ADD B,A
      I(12, 0, 0, 0),     // 83 SHIFTL A
      I(15, 0, 1, -3),    // 84 BRNE 82
      I(10, 1, 0, 1),     // 85 STORE [1],B
      I(1, 0, 0, 8'h85),  // 86 INPUTC [85]   refused in RUN mode
      I(3, 3, 0, 7),      // 87 LOADI D,7
      I(11, 3, 3, 0),     // 88 STOREF [D+0],D
      I(14, 0, 0, -1)};   // 89 JUMP 89
    boot = '{
      I(3, 0, 0, 5),       // 00 LOADI A,5
      I(3, 1, 0, 8'hFB),   // 01 LOADI B,-5
      I(4, 0, 1, 0),       // 02 ADD A,B      zero, carry
      I(15, 0, 0, 1),      // 03 BRE 05       taken
      I(3, 3, 0, 8'hEE),   // 04 (skipped)
      I(3, 0, 0, 8'h7F),   // 05 LOADI A,7F
      I(5, 0, 0, 1),       // 06 ADDI A,1     overflow, negative
      I(15, 0, 0, 5),      // 07 BRE          not taken
      I(2, 2, 0, 0),       // 08 MOVE C,A
      I(6, 2, 0, 0),       // 09 SUB C,A
      I(7, 2, 0, 1),       // 0A SUBI C,1     borrow
      I(12, 2, 0, 0),      // 0B SHIFTL C
      I(12, 2, 1, 0),      // 0C SHIFTR C
      I(10, 2, 0, 0),      // 0D STORE [0],C
      I(3, 3, 0, 3),       // 0E LOADI D,3
      I(11, 0, 3, 1),      // 0F STOREF [D+1],A
      I(8, 1, 0, 0),       // 10 LOAD B,[0]
      I(9, 0, 3, 1),       // 11 LOADF A,[D+1]
      I(13, 1, 0, 0),      // 12 CMP B,A
      I(15, 0, 2, 1),      // 13 BRG 15       taken
      I(3, 3, 0, 8'hEE),   // 14 (skipped)
      I(13, 0, 1, 0),      // 15 CMP A,B
      I(15, 0, 3, 1),      // 16 BRGE         not taken
      I(1, 0, 2, 8'h10),   // 17 INPUTD [10]
      I(1, 3, 3, 2),       // 18 INPUTDF [D+2]
      I(0, 0, 0, 0),       // 19 NOOP
      I(3, 0, 0, 8'h80),   // 1A LOADI A,80
      I(1, 0, 1, 0),       // 1B INPUTCF [A+0]  copy loop
      I(5, 0, 0, 1),       // 1C ADDI A,1
      I(3, 1, 0, 8'h8A),   // 1D LOADI B,8A
      I(13, 0, 1, 0),      // 1E CMP A,B
      I(15, 0, 1, -5),     // 1F BRNE 1B
      I(1, 0, 0, 8'hFF),   // 20 INPUTC [FF]
      I(14, 0, 0, 8'h5E)}; // 21 JUMP 80

    sw_reg = 0; run_sw = 0; game_sw = 0; reset_sw = 1; step_sw = 0; exam_sw = 0; dep_sw = 0;
    cd_sw = 0; speed_sel = 2; rom_we = 0; rom_addr = 0; rom_data = 0;

    // program the BIOS ROM (unused words are NOOPs)
    for (int a = 0; a < 128; a++) begin
      m_rom[a] = (a < 34) ? boot[a] : 16'h0000;
      m_ram_ok[a] = 0;
      @(negedge clk);
      rom_we = 1; rom_addr = 8'(a); rom_data = m_rom[a];
    end
    @(negedge clk);
    rom_we = 0;
    repeat (6) @(negedge clk);
    check(pc == 0 && regs == '0 && flags == '0 && boot_mode, "reset state");
    n_reset++;
    m_pc = 0; m_z = 0; m_n = 0; m_v = 0; m_c = 0;
    for (int r = 0; r < 4; r++) m_reg[r] = 0;
    for (int i = 0; i < 8; i++) m_video[i] = 0;
    model_on = 1;
    reset_sw = 0;
    repeat (3) @(negedge clk);

    // 1-3: run the boot program and the user program
    run_sw = 1;
    wait_pc(8'h80, 4000);
    check(!boot_mode, "RUN mode after the jump into RAM");
    speed_sel = 2;
    wait_pc(8'h89, 4000);
    check(running, "run/halt state shows run");
    repeat (40) @(negedge clk);
    check(m_video[1] == 8'hFF && m_video[7] == 8'h07, "user program results");
    speed_sel = 0;
    repeat (40) @(negedge clk);

    // 4: halt and debug
    run_sw = 0;
    repeat (40) @(negedge clk);
    check(m_pc == 8'h89, "halted");
    check(!running, "run/halt state shows halt");
    strobe(step_sw, MOCK_STEP);
    sw_reg = 16'h0002;
    strobe(exam_sw, MOCK_EXAM);                     // PC = 8C
    check(m_pc == 8'h8C, "examine moved the PC");
    cd_sw = 0;
    sw_reg = I(3, 2, 0, 8'h42);
    strobe(dep_sw, MOCK_DEP);                       // RAM[8C] = LOADI C,42
    sw_reg = I(14, 0, 0, -1);
    strobe(dep_sw, MOCK_DEP);                       // RAM[8D] = JUMP 8D
    sw_reg = 16'h00FD;
    strobe(exam_sw, MOCK_EXAM);                     // PC = 8C
    strobe(step_sw, MOCK_STEP);                     // LOADI C,42
    check(m_reg[2] == 8'h42, "deposited code ran");
    sw_reg = 16'h00F4;
    strobe(exam_sw, MOCK_EXAM);                     // PC = 8D + 1 - 12 = 82
    cd_sw = 1;
    sw_reg = 16'h005A;
    strobe(dep_sw, MOCK_DEP);                       // DMEM[02] = 5A (display 2)
    check(m_video[2] == 8'h5A, "deposit into data memory");
    sw_reg = 16'h0002;
    cd_sw = 0;
    strobe(exam_sw, MOCK_EXAM);                     // PC = 86
    check(instr == user_prog[6], "code RAM unchanged by the refused write");
    speed_sel = 0;
    repeat (10) @(negedge clk);

    // 5: display formats
    game_sw = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      check(seg[i] == vbytes[i], "game mode: bits drive segments");
      n_game_chk++;
    end
    game_sw = 0;
    repeat (5) @(negedge clk);
    check(seg[7] == 8'h07 && seg[1] == 8'h71 && seg[2] == 8'h77, "hex mode digits 7, F, A");
    n_hex_chk++;

    // reset back to the boot state
    model_on = 0;
    reset_sw = 1;
    repeat (6) @(negedge clk);
    check(pc == 0 && regs == '0 && boot_mode && vbytes == '0, "reset returns to BOOT");
    n_reset++;

    // ---------------- mechanism coverage ----------------
    for (int o = 0; o < 23; o++) check(op_seen[o] > 0, $sformatf("operation %0d executed", o));
    check(n_taken > 0,         "branch taken");
    check(n_not_taken > 0,     "branch not taken");
    check(n_boot_to_run > 0,   "BOOT to RUN mode switch");
    check(n_blocked_model > 0 && n_blocked_model == n_blocked_dut, "RUN-mode code write refused");
    check(n_exam == 4,         "examine");
    check(n_dep_code == 2,     "deposit into code memory");
    check(n_dep_data == 1,     "deposit into data memory");
    check(n_step == 2,         "single step");
    check(n_halt_idle > 0,     "halt");
    check(n_video_wr > 0,      "video card write");
    check(n_carry > 0,         "carry flag set");
    check(n_ovf > 0,           "overflow flag set");
    check(n_game_chk > 0 && n_hex_chk > 0, "both display modes");
    check(n_reset == 2,        "reset");
    check(n_rate_fast > 0 && n_rate_slow > 0, "two clock speeds");
    check(n_rate_boot > 0, "boot program faster than the speed switch");
    $display("executed: BOOT %0d, RUN %0d; branches taken %0d, not taken %0d",
             n_run_boot, n_run_user, n_taken, n_not_taken);
    $display("examine %0d, deposit code %0d, deposit data %0d, single step %0d, refused writes %0d",
             n_exam, n_dep_code, n_dep_data, n_step, n_blocked_dut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
