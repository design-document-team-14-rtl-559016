// tb_video_card: self-checking test of the memory-mapped video card.
// Random data-memory writes are applied; writes to addresses 0..7 must
// update the matching digit and no other, writes elsewhere nothing. The
// segments are checked in both modes: in game mode equal to the byte, in
// hex mode against a digit-pattern table written out here.
module tb_video_card;
  logic            clk = 0, rst, en, we, game;
  logic [6:0]      addr;
  logic [7:0]      din;
  logic [7:0][7:0] bytes, seg;
  logic [7:0]      model [8];
  // {g,f,e,d,c,b,a} for 0..F
  logic [6:0] hexpat [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                              7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  int checks = 0, failures = 0, mapped = 0, unmapped = 0;

  video_card dut (.clk(clk), .rst(rst), .en(en), .write_en(we), .addr(addr), .din(din),
                  .game_mode(game), .bytes(bytes), .seg(seg));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; we = 0; addr = 0; din = 0; game = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 8'h00;
    for (int n = 0; n < 2000; n++) begin
      en = 1'($urandom); we = 1'($urandom); din = 8'($urandom);
      addr = (n % 2 != 0) ? 7'($urandom_range(0, 7)) : 7'($urandom);
      @(posedge clk); #1;
      if (en && we && addr < 8) begin model[addr[2:0]] = din; mapped++; end
      else if (en && we) unmapped++;
      for (int g = 0; g < 2; g++) begin
        game = 1'(g); #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (bytes[i] != model[i] ||
              seg[i] != ((g != 0) ? model[i] : {1'b0, hexpat[model[i][3:0]]})) begin
            failures++;
            $display("FAIL digit %0d game=%0d byte=%h seg=%h model=%h", i, g, bytes[i], seg[i], model[i]);
          end
        end
      end
    end
    $display("mapped writes %0d, other writes %0d", mapped, unmapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
