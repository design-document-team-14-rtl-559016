// tb_mux2: self-checking test of the 8-bit 2-to-1 multiplexer. Drives
// random U, V and select values and compares Z bit by bit with the
// expected input.
module tb_mux2;
  logic       sel;
  logic [7:0] u, v, z;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(8)) dut (.sel(sel), .u(u), .v(v), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      u = 8'($urandom); v = 8'($urandom); sel = 1'($urandom);
      #1;
      checks++;
      if (z !== (sel ? v : u)) begin
        failures++;
        $display("FAIL sel=%0d u=%h v=%h z=%h", sel, u, v, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
