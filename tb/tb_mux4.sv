// tb_mux4: self-checking test of the 8-bit 4-to-1 multiplexer. Drives
// random A-D inputs and every select value and checks P.
module tb_mux4;
  logic [1:0] sel;
  logic [7:0] a, b, c, d, p, exp_p;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(8)) dut (.sel(sel), .a(a), .b(b), .c(c), .d(d), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      sel = 2'(n);
      #1;
      exp_p = (sel == 0) ? a : (sel == 1) ? b : (sel == 2) ? c : d;
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL sel=%0d p=%h exp=%h", sel, p, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
