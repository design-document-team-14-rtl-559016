// tb_code_memory: self-checking test of the ROM/RAM instruction memory.
// 1. Programs the ROM through the programmer port and reads it back.
// 2. With the PC in the ROM (BOOT mode), writes RAM words through the c1
//    port and checks them by fetching with the PC in the RAM.
// 3. With the PC in the RAM (RUN mode), checks that a write is refused
//    and flagged, and that writes to ROM addresses never change the ROM.
// 4. Checks that an injected instruction replaces the fetched one and that
//    a write is accepted in RUN mode during an injected cycle.
module tb_code_memory;
  import i281_pkg::*;
  logic        clk = 0, en, inj_v, boot, we, blocked, pwe;
  instr_t      inj_i, instr;
  logic [7:0]  pc, waddr, paddr;
  logic [15:0] wdata, pdata;
  logic [15:0] rom_m [128];
  logic [15:0] ram_m [128];
  int checks = 0, failures = 0, nblocked = 0;

  code_memory dut (.clk(clk), .en(en), .pc(pc), .inject_valid(inj_v), .inject_instr(inj_i),
                   .instr(instr), .boot_mode(boot), .write_en(we), .waddr(waddr),
                   .wdata(wdata), .write_blocked(blocked), .rom_prog_we(pwe),
                   .rom_prog_addr(paddr), .rom_prog_data(pdata));

  always #5 clk = ~clk;

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

  initial begin
    en = 1; inj_v = 0; inj_i = '0; we = 0; waddr = 0; wdata = 0; pc = 0; pwe = 0;
    paddr = 0; pdata = 0;
    // 1. program the ROM
    for (int i = 0; i < 128; i++) begin
      pwe = 1; paddr = 8'(i); pdata = 16'($urandom); rom_m[i] = pdata;
      @(posedge clk); #1;
    end
    pwe = 0;
    for (int i = 0; i < 128; i++) begin
      pc = 8'(i); #1;
      check(instr == rom_m[i], $sformatf("rom %0d", i));
      check(boot, "boot mode while PC in ROM");
    end
    // 2. BOOT-mode writes to RAM
    pc = 8'd3;
    for (int i = 0; i < 128; i++) begin
      we = 1; waddr = 8'(128 + i); wdata = 16'($urandom); ram_m[i] = wdata; en = 1;
      #1 check(!blocked, "no block in BOOT mode");
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 128; i++) begin
      pc = 8'(128 + i); #1;
      check(instr == ram_m[i], $sformatf("ram %0d", i));
      check(!boot, "run mode while PC in RAM");
    end
    // 3. RUN-mode writes refused; ROM never written through c1
    for (int n = 0; n < 300; n++) begin
      pc = 8'(128 + $urandom_range(0, 127));
      we = 1; waddr = 8'($urandom); wdata = 16'($urandom); en = 1'($urandom);
      #1;
      check(blocked == (en && waddr >= 128), "write_blocked flag");
      if (blocked) nblocked++;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 128; i++) begin
      pc = 8'(i); #1;
      check(instr == rom_m[i], $sformatf("rom kept %0d", i));
      pc = 8'(128 + i); #1;
      check(instr == ram_m[i], $sformatf("ram kept %0d", i));
    end
    // 4. injection
    for (int n = 0; n < 100; n++) begin
      pc = 8'(128 + $urandom_range(0, 127));
      inj_v = 1; inj_i = instr_t'(16'($urandom));
      we = 1'($urandom); waddr = 8'(128 + $urandom_range(0, 127)); wdata = 16'($urandom);
      en = 1;
      #1;
      check(instr == inj_i, "injected instruction on the bus");
      check(!blocked, "injected cycle may write RAM");
      @(posedge clk); #1;
      if (we) ram_m[waddr - 128] = wdata;
      inj_v = 0; we = 0;
      pc = waddr; #1;
      check(instr == ram_m[waddr - 128], "write during injected cycle");
    end
    check(nblocked > 0, "some RUN-mode writes were refused");
    $display("RUN-mode writes refused: %0d", nblocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
