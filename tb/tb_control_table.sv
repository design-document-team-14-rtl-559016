// tb_control_table: self-checking test of the control table.
// The expected control lines are written out as one 18-character row per
// operation, c1 first: '0'/'1' fixed, 'X'/'Y' the bit of register field
// X/Y (the first of a select pair takes bit 1), 'B' the branch condition.
// Every operation is applied with every X/Y field value and every flag
// combination, and all eighteen lines are compared.
module tb_control_table;
  import i281_pkg::*;
  logic [NUM_OPS-1:0] ops;
  logic [3:0]         xy;
  flags_t             flags;
  ctrl_t              ctrl;
  logic [17:0]        exp_c;
  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0;
  byte  ch;
  logic bitv, hi;
  string rows [NUM_OPS] = '{
    "001000000000000000",  // NOOP
    "101000000000001000",  // INPUTC
    "101XX0000011000000",  // INPUTCF
    "001000000000001110",  // INPUTD
    "001XX0000011000110",  // INPUTDF
    "001YY00XX111000000",  // MOVE
    "0010000XX100001000",  // LOADI
    "001XXYYXX101010000",  // ADD
    "001XX00XX111010000",  // ADDI
    "001XXYYXX101110000",  // SUB
    "001XX00XX111110000",  // SUBI
    "0010000XX100001001",  // LOAD
    "001YY00XX111000001",  // LOADF
    "00100XX00000001010",  // STORE
    "001YYXX00011000010",  // STOREF
    "001XX00XX100010000",  // SHIFTL
    "001XX00XX100110000",  // SHIFTR
    "001XXYY00001110000",  // CMP
    "011000000000000000",  // JUMP
    "0B1000000000000000",  // BRE
    "0B1000000000000000",  // BRNE
    "0B1000000000000000",  // BRG
    "0B1000000000000000"   // BRGE
  };

  control_table dut (.ops(ops), .xy(xy), .flags(flags), .ctrl(ctrl));

  function automatic logic branch_cond(int op, flags_t f);
    logic s_gt, s_ge;
    // signed compare of X - Y from the flags: X >= Y when N equals V
    s_ge = (f.nf == f.of);
    s_gt = s_ge && !f.zf;
    case (op)
      19: return f.zf;
      20: return !f.zf;
      21: return 1'(s_gt);
      default: return 1'(s_ge);
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < NUM_OPS; op++) begin
      for (int f = 0; f < 16; f++) begin
        for (int v = 0; v < 16; v++) begin
          ops = NUM_OPS'(1) << op; xy = 4'(v); flags = flags_t'(4'(f));
          #1;
          for (int p = 1; p <= 18; p++) begin
            ch = rows[op].getc(p - 1);
            hi = (p == 4 || p == 6 || p == 8);
            case (ch)
              8'h30: bitv = 1'b0;                   // '0'
              8'h31: bitv = 1'b1;                   // '1'
              8'h58: bitv = hi ? xy[3] : xy[2];     // 'X'
              8'h59: bitv = hi ? xy[1] : xy[0];     // 'Y'

              default: bitv = branch_cond(op, flags);
            endcase
            exp_c[18 - p] = bitv;
          end
          if (op >= 19) begin
            if (exp_c[16]) taken++; else not_taken++;
          end
          checks++;
          if (ctrl != exp_c) begin
            failures++;
            if (failures < 10)
              $display("FAIL op=%0d xy=%b flags=%b ctrl=%b exp %b", op, xy, flags, ctrl, exp_c);
          end
        end
      end
    end
    if (taken == 0 || not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
