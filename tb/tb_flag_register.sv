// tb_flag_register: self-checking test of the 4-bit flag register. Drives
// random flag words with random write and clock enables and checks that
// the register loads only when both are high and holds otherwise.
module tb_flag_register;
  import i281_pkg::*;
  logic   clk = 0, rst, en, we;
  flags_t d, q, model;
  int checks = 0, failures = 0;

  flag_register dut (.clk(clk), .rst(rst), .en(en), .write_en(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; we = 0; d = '1;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++; if (q != 4'b0000) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 500; n++) begin
      en = 1'($urandom); we = 1'($urandom); d = flags_t'(4'($urandom));
      @(posedge clk); #1;
      if (en && we) model = d;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL en=%0d we=%0d q=%b exp %b", en, we, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
