// tb_register_file: self-checking test of the four-register file.
// Resets it, then for many random cycles drives a write (enable, select,
// data, and the CPU clock enable) and two read selects, and compares both
// read ports and all four registers with a model array. Checks that a write
// lands only with both enables high and only in the selected register.
module tb_register_file;
  logic clk = 0, rst, en, we;
  logic [1:0] wsel, s0, s1;
  logic [7:0] din, p0, p1;
  logic [3:0][7:0] regs;
  logic [7:0] model [4];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .en(en), .write_en(we), .write_sel(wsel),
                     .din(din), .p0_sel(s0), .p1_sel(s1), .port0(p0), .port1(p1),
                     .regs(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    rst = 1; en = 0; we = 0; wsel = 0; din = 0; s0 = 0; s1 = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 4; r++) model[r] = 8'h00;
    for (int r = 0; r < 4; r++) check(regs[r] == 8'h00, "reset value");
    for (int n = 0; n < 1000; n++) begin
      en = 1'($urandom); we = 1'($urandom); wsel = 2'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      if (en && we) model[wsel] = din;
      s0 = 2'($urandom); s1 = 2'($urandom);
      #1;
      check(p0 == model[s0], $sformatf("port0 sel=%0d got %h exp %h", s0, p0, model[s0]));
      check(p1 == model[s1], $sformatf("port1 sel=%0d got %h exp %h", s1, p1, model[s1]));
      for (int r = 0; r < 4; r++)
        check(regs[r] == model[r], $sformatf("reg %0d got %h exp %h", r, regs[r], model[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
