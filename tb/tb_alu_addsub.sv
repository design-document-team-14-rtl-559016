// tb_alu_addsub: exhaustive self-checking test of the adder/subtractor.
// For every pair of bytes, in add and subtract mode, compares sum, carry
// (carry out; for subtraction 1 = no borrow), signed overflow, zero and
// negative with values computed from integer arithmetic.
module tb_alu_addsub;
  logic       sub, carry, ovf, zero, neg;
  logic [7:0] x, y, s;
  int checks = 0, failures = 0;
  int ux, uy, sx, sy, ures, sres, exp_s, exp_c, exp_v;

  alu_addsub #(.WIDTH(8)) dut (.sub(sub), .x(x), .y(y), .s(s), .carry(carry),
                               .overflow(ovf), .zero(zero), .negative(neg));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (ux = 0; ux < 256; ux++) begin
        for (uy = 0; uy < 256; uy++) begin
          x = 8'(ux); y = 8'(uy); sub = 1'(m);
          #1;
          sx = (ux > 127) ? ux - 256 : ux;
          sy = (uy > 127) ? uy - 256 : uy;
          if (m == 0) begin
            ures = ux + uy;         sres = sx + sy;
            exp_c = (ures > 255) ? 1 : 0;
          end else begin
            ures = ux - uy + 256;   sres = sx - sy;
            exp_c = (ux >= uy) ? 1 : 0;
          end
          exp_s = ures % 256;
          exp_v = (sres > 127 || sres < -128) ? 1 : 0;
          checks++;
          if (int'(s) != exp_s || int'(carry) != exp_c || int'(ovf) != exp_v ||
              zero != (exp_s == 0) || neg != (exp_s > 127)) begin
            failures++;
            if (failures < 10)
              $display("FAIL sub=%0d x=%h y=%h s=%h c=%0d v=%0d exp %h %0d %0d",
                       m, x, y, s, carry, ovf, exp_s, exp_c, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
