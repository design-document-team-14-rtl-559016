// tb_opcode_decoder: exhaustive self-checking test of the opcode decoder.
// For every value of instruction bits 15:8 (the low byte is random), the
// expected operation is looked up in a table written out independently
// (opcode x sub-operation -> operation index) and the decoder's one-hot
// output must have exactly that bit set; bits 11:8 must be passed on.
module tb_opcode_decoder;
  import i281_pkg::*;
  instr_t            instr;
  logic [NUM_OPS-1:0] ops;
  logic [3:0]        xy;
  int checks = 0, failures = 0;
  int exp_op;
  // Expected operation index for opcode o and bits 9:8 = s: row o, column s.
  int table_exp [16][4] = '{
    '{0, 0, 0, 0}, '{1, 2, 3, 4}, '{5, 5, 5, 5}, '{6, 6, 6, 6},
    '{7, 7, 7, 7}, '{8, 8, 8, 8}, '{9, 9, 9, 9}, '{10, 10, 10, 10},
    '{11, 11, 11, 11}, '{12, 12, 12, 12}, '{13, 13, 13, 13}, '{14, 14, 14, 14},
    '{15, 16, 15, 16}, '{17, 17, 17, 17}, '{18, 18, 18, 18}, '{19, 20, 21, 22}};

  opcode_decoder dut (.instr(instr), .ops(ops), .xy(xy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int hi = 0; hi < 256; hi++) begin
      instr = instr_t'({8'(hi), 8'($urandom)});
      #1;
      exp_op = table_exp[hi / 16][hi % 4];
      checks++;
      if (ops != (23'b1 << exp_op) || xy != 4'(hi)) begin
        failures++;
        $display("FAIL instr=%h ops=%b exp op %0d", instr, ops, exp_op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
