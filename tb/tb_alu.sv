// tb_alu: self-checking test of the ALU with its flag register.
// Applies random operands in all four modes (SHIFTL, SHIFTR, ADD, SUB),
// compares the combinational result and next flags with an integer
// reference (shift-out as carry and overflow 0 for shifts; carry out and
// signed overflow for add/sub; zero and negative of the result), then
// clocks the flag register with random write enables and checks it.
module tb_alu;
  import i281_pkg::*;
  logic       clk = 0, rst, en, fwe;
  alu_sel_e   sel;
  logic [7:0] a, b, res;
  flags_t     fn, fq, model_q, exp_f;
  int checks = 0, failures = 0;
  int ua, ub, sa, sb, r, sr;
  int seen[4];

  alu dut (.clk(clk), .rst(rst), .en(en), .sel(sel), .flags_we(fwe), .a(a), .b(b),
           .result(res), .flags_next(fn), .flags(fq));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; fwe = 0; sel = ALU_ADD; a = 0; b = 0;
    @(posedge clk); #1;
    rst = 0; model_q = '0;
    for (int n = 0; n < 4000; n++) begin
      ua = $urandom_range(0, 255); ub = $urandom_range(0, 255);
      if (n % 7 == 0) ub = ua;            // exercise zero results
      a = 8'(ua); b = 8'(ub); sel = alu_sel_e'(2'(n)); seen[n % 4]++;
      en = 1'($urandom); fwe = 1'($urandom);
      sa = (ua > 127) ? ua - 256 : ua;
      sb = (ub > 127) ? ub - 256 : ub;
      unique case (sel)
        ALU_SHIFTL: begin r = (ua * 2) % 256; exp_f.cf = (ua >= 128); exp_f.of = 0; end
        ALU_SHIFTR: begin r = ua / 2;         exp_f.cf = 1'(ua % 2);      exp_f.of = 0; end
        ALU_ADD: begin
          r = (ua + ub) % 256; exp_f.cf = (ua + ub > 255);
          sr = sa + sb; exp_f.of = (sr > 127 || sr < -128);
        end
        default: begin
          r = (ua - ub + 256) % 256; exp_f.cf = (ua >= ub);
          sr = sa - sb; exp_f.of = (sr > 127 || sr < -128);
        end
      endcase
      exp_f.zf = (r == 0);
      exp_f.nf = (r > 127);
      #1;
      checks++;
      if (int'(res) != r || fn != exp_f) begin
        failures++;
        $display("FAIL sel=%0d a=%h b=%h res=%h fn=%b exp %h %b", sel, a, b, res, fn, r, exp_f);
      end
      @(posedge clk); #1;
      if (en && fwe) model_q = exp_f;
      checks++;
      if (fq != model_q) begin
        failures++;
        $display("FAIL flag register %b exp %b", fq, model_q);
      end
    end
    $display("modes exercised: shl=%0d shr=%0d add=%0d sub=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
