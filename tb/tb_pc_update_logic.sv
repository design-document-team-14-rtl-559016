// tb_pc_update_logic: exhaustive self-checking test of the next-PC logic.
// For every PC, every 8-bit offset and both mux settings, checks that the
// next PC is PC+1 (c2 = 0) or PC+1+offset modulo 256 (c2 = 1), with the
// offset read as a two's complement value.
module tb_pc_update_logic;
  logic [7:0] pc, off, nxt;
  logic       mux;
  int checks = 0, failures = 0;
  int soff, exp_n;

  pc_update_logic dut (.pc(pc), .offset(off), .pc_mux(mux), .pc_next(nxt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      for (int o = 0; o < 256; o++) begin
        for (int m = 0; m < 2; m++) begin
          pc = 8'(p); off = 8'(o); mux = 1'(m);
          #1;
          soff  = (o > 127) ? o - 256 : o;
          exp_n = (m != 0) ? (p + 1 + soff + 512) % 256 : (p + 1) % 256;
          checks++;
          if (int'(nxt) != exp_n) begin
            failures++;
            if (failures < 10) $display("FAIL pc=%0d off=%0d m=%0d got %0d exp %0d", p, soff, m, nxt, exp_n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
