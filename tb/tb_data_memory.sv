// tb_data_memory: self-checking test of the 128-byte data memory. Writes
// every address with a known pattern, then runs random reads and writes
// with random enables against a model array.
module tb_data_memory;
  logic       clk = 0, en, we;
  logic [6:0] addr;
  logic [7:0] din, dout;
  logic [7:0] model [128];
  int checks = 0, failures = 0;

  data_memory dut (.clk(clk), .en(en), .write_en(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1;
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); din = 8'(i * 37 + 5); model[i] = din;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); #1;
      checks++;
      if (dout != model[i]) begin failures++; $display("FAIL rd %0d %h exp %h", i, dout, model[i]); end
    end
    for (int n = 0; n < 2000; n++) begin
      en = 1'($urandom); we = 1'($urandom); addr = 7'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      if (en && we) model[addr] = din;
      addr = 7'($urandom); #1;
      checks++;
      if (dout != model[addr]) begin failures++; $display("FAIL %0d %h exp %h", addr, dout, model[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
