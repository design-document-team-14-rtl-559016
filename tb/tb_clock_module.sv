// tb_clock_module: self-checking test of the speed-selectable clock.
// For each of the five rotary positions, measures the distance between
// successive ticks and checks it is the expected divisor (2, 4, 8, 256,
// 4096 oscillator cycles) and that each tick lasts one clock. Then, with
// fast = 1, every position must give the fastest divisor (2).
module tb_clock_module;
  logic        clk = 0, rst, tick, fast;
  logic [2:0]  sel;
  logic [11:0] count;
  int checks = 0, failures = 0;
  int divs [5] = '{2, 4, 8, 256, 4096};
  int last, gap, nt;

  clock_module dut (.clk(clk), .rst(rst), .speed_sel(sel), .fast(fast), .tick(tick), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sel = 0; fast = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 6; p++) begin
      int d;
      d = divs[(p < 5) ? p : 4];
      sel = 3'(p);
      last = -1; nt = 0;
      for (int c = 0; c < d * 4 + 2; c++) begin
        @(negedge clk);
        if (tick) begin
          if (last >= 0) begin
            gap = c - last;
            checks++;
            if (gap != d) begin failures++; $display("FAIL pos %0d gap %0d exp %0d", p, gap, d); end
          end
          last = c; nt++;
        end
      end
      checks++;
      if (nt < 3) begin failures++; $display("FAIL pos %0d only %0d ticks", p, nt); end
    end
    fast = 1;
    for (int p = 0; p < 5; p++) begin
      sel = 3'(p);
      last = -1; nt = 0;
      for (int c = 0; c < 12; c++) begin
        @(negedge clk);
        if (tick) begin
          if (last >= 0) begin
            checks++;
            if (c - last != 2) begin failures++; $display("FAIL fast pos %0d gap %0d", p, c - last); end
          end
          last = c; nt++;
        end
      end
      checks++;
      if (nt < 5) begin failures++; $display("FAIL fast pos %0d only %0d ticks", p, nt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
