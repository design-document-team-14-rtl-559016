// tb_i281_workload: a program that fills the whole code RAM, loaded by a
// loader in the boot ROM and run on the complete i281 at its default sizes.
//
// The capacity the machine is meant to offer: at least 64 program words in
// RAM and at least 6 bits of program addressing. This test uses all 128
// RAM words, so the program runs from 0x80 to the last address 0xFF and
// its final JUMP-to-itself wraps PC+1 through 0x00.
//
// The 7-word loader in ROM:
//   LOADI B,0 ; LOADI C,0x80
//   loop: INPUTCF [B+0x80] ; ADDI B,1 ; CMP B,C ; BRNE loop
//   JUMP 0x80
// copies one word from the switch register per pass. The testbench plays
// the program source: the switch register always shows program word B.
// The user program is LOADI A,0, then 123 ADDI A,k with varying k, then
// STORE A,[0]; SHIFTR A; STORE A,[1]; JUMP-to-itself.
//
// Checked: every RAM word after loading, the BOOT to RUN switch, that the
// loader ran at the fastest rate although the speed switch is at its
// slowest, the number of user instructions executed, the final PC,
// register A and the two display bytes. Expected values are computed here
// from the program, not taken from the design.
module tb_i281_workload;
  import i281_pkg::*;

  localparam int NWORDS = 128;

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

  function automatic logic [15:0] I(int opc, int x, int y, logic [7:0] imm);
    return 16'((opc << 12) | (x << 10) | (y << 8) | int'(imm));
  endfunction

  logic [15:0] loader [7];
  logic [15:0] prog [NWORDS];
  int          sum;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the program source: word B of the program on the switch register
  always @(negedge clk) sw_reg = prog[regs[1][6:0]];

  // instruction rates and counts
  int last_en = -1, cyc = 0, n_boot = 0, n_run = 0, n_boot_gap_bad = 0, n_blocked = 0;
  bit last_boot;
  always @(negedge clk) begin
    cyc++;
    if (cpu_en && run_sw) begin
      if (boot_mode) n_boot++;
      else if (pc != 8'hFF) n_run++;
      if (blocked) n_blocked++;
      if (boot_mode && last_boot && last_en >= 0 && cyc - last_en != 2) n_boot_gap_bad++;
      last_en = cyc;
      last_boot = boot_mode;
    end
  end

  initial begin
    loader[0] = I(3, 1, 0, 8'h00);   // LOADI B,0
    loader[1] = I(3, 2, 0, 8'h80);   // LOADI C,80
    loader[2] = I(1, 1, 1, 8'h80);   // INPUTCF [B+80]
    loader[3] = I(5, 1, 0, 8'h01);   // ADDI B,1
    loader[4] = I(13, 1, 2, 8'h00);  // CMP B,C
    loader[5] = I(15, 0, 1, -4);     // BRNE 2
    loader[6] = I(14, 0, 0, 8'h79);  // JUMP 80
    sum = 0;
    prog[0] = I(3, 0, 0, 8'h00);     // LOADI A,0
    for (int i = 1; i < 124; i++) begin
      logic [7:0] k;
      k = 8'((i * 37 + 11) % 256);
      prog[i] = I(5, 0, 0, k);        // ADDI A,k
      sum = (sum + int'(k)) % 256;
    end
    prog[124] = I(10, 0, 0, 8'h00);  // STORE A,[0]
    prog[125] = I(12, 0, 1, 8'h00);  // SHIFTR A
    prog[126] = I(10, 0, 0, 8'h01);  // STORE A,[1]
    prog[127] = I(14, 0, 0, -1);     // FF: JUMP FF

    run_sw = 0; game_sw = 0; reset_sw = 1; step_sw = 0; exam_sw = 0; dep_sw = 0;
    cd_sw = 0; speed_sel = 4; rom_we = 0; rom_addr = 0; rom_data = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      rom_we = 1; rom_addr = 8'(a); rom_data = (a < 7) ? loader[a] : 16'h0000;
    end
    @(negedge clk);
    rom_we = 0;
    repeat (6) @(negedge clk);
    check(pc == 8'h00 && boot_mode, "reset into the boot ROM");
    reset_sw = 0;
    repeat (3) @(negedge clk);

    run_sw = 1;
    while (boot_mode) @(negedge clk);
    check(pc == 8'h80, "loader jumped to the start of RAM");
    check(n_boot == 2 + 4 * NWORDS + 1, $sformatf("loader ran %0d instructions", n_boot));
    check(n_boot_gap_bad == 0, "loader ran at 1 MHz with the speed switch at its slowest");
    for (int a = 0; a < NWORDS; a++)
      check(dut.u_cmem.ram[a] == prog[a], $sformatf("RAM word %0d", a));

    speed_sel = 0;
    while (pc != 8'hFF) @(negedge clk);
    repeat (20) @(negedge clk);
    check(pc == 8'hFF && !boot_mode, "program stays at its last word");
    check(n_run == NWORDS - 1, $sformatf("%0d user instructions executed", n_run));
    check(regs[0] == 8'(sum >> 1), "register A");
    check(vbytes[0] == 8'(sum) && vbytes[1] == 8'(sum >> 1), "display bytes");
    check(n_blocked == 0, "no refused writes");
    $display("loader %0d instructions, program %0d words, sum %02h", n_boot, NWORDS, sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
