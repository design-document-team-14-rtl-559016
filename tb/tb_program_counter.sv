// tb_program_counter: self-checking test of the PC register. Checks the
// reset value, then that the PC loads the next value only when both the
// clock enable and c3 are high.
module tb_program_counter;
  logic       clk = 0, rst, en, we;
  logic [7:0] nxt, pc, model;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .en(en), .write_en(we), .pc_next(nxt), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1; we = 1; nxt = 8'h5A;
    @(posedge clk); #1;
    checks++; if (pc != 8'h00) begin failures++; $display("FAIL reset %h", pc); end
    rst = 0; model = 8'h00;
    for (int n = 0; n < 500; n++) begin
      en = 1'($urandom); we = 1'($urandom); nxt = 8'($urandom);
      @(posedge clk); #1;
      if (en && we) model = nxt;
      checks++;
      if (pc != model) begin failures++; $display("FAIL pc=%h exp %h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
