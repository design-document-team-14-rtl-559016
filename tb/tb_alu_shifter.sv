// tb_alu_shifter: exhaustive self-checking test of the one-place shifter.
// For every input byte and both directions, compares the output with a
// multiply/divide-by-two reference and checks the shifted-out bit.
module tb_alu_shifter;
  logic       sel, so;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  int exp_v, exp_so;

  alu_shifter #(.WIDTH(8)) dut (.sel(sel), .din(din), .dout(dout), .shift_out(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      for (int s = 0; s < 2; s++) begin
        din = 8'(d); sel = 1'(s);
        #1;
        if (s == 0) begin
          exp_v = (d * 2) % 256;  exp_so = d / 128;
        end else begin
          exp_v = d / 2;          exp_so = d % 2;
        end
        checks++;
        if (int'(dout) != exp_v || int'(so) != exp_so) begin
          failures++;
          $display("FAIL d=%h sel=%0d out=%h so=%0d exp %h %0d", d, s, dout, so, exp_v, exp_so);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
