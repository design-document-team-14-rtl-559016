// clock_module: the speed-selectable system clock of the i281.
//
// The whole CPU runs from the crystal oscillator clock clk (2 MHz). A
// free-running DIV_BITS-stage binary counter divides it, and a rotary switch
// (speed_sel, NPOS positions) picks one counter stage: position p gives a
// one-clock-wide tick every 2^TAPS[p] oscillator cycles. The tick is used as
// the CPU clock enable while running, so the CPU is fully synchronous to
// clk and a single-cycle instruction takes one tick. Positions beyond the
// last select the last one. While fast is 1 (the CPU is executing the boot
// program from ROM) the first, fastest position is used whatever the
// switch says, so the loader never makes the user wait.
//
// The 2 MHz oscillator, the 12-stage counter and the five-position switch
// follow the parts the design uses for its clock. The taps are this
// implementation's choice: 1 MHz (the design's target), 500 kHz, 250 kHz
// (its test milestones), about 7.8 kHz and about 490 Hz for watching a
// program run. Using a clock enable instead of a divided clock is also
// this implementation's choice. The fast input follows the design's demand
// that the boot program run faster than user code; that it overrides the
// switch with the 1 MHz setting is this implementation's choice.
module clock_module #(
  parameter int unsigned DIV_BITS = 12,
  parameter int unsigned NPOS     = 5,
  parameter logic [NPOS-1:0][3:0] TAPS = {4'd12, 4'd8, 4'd3, 4'd2, 4'd1}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [2:0]          speed_sel,
  input  logic                fast,
  output logic                tick,
  output logic [DIV_BITS-1:0] count
);
  logic [3:0]          tap;
  logic [DIV_BITS-1:0] mask;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

  always_comb begin
    if (fast)                       tap = TAPS[0];
    else if (int'(speed_sel) < NPOS) tap = TAPS[speed_sel];
    else                            tap = TAPS[NPOS-1];
    mask = DIV_BITS'((64'd1 << tap) - 64'd1);
    tick = !rst && ((count & mask) == mask);
  end

  initial begin
    for (int p = 0; p < NPOS; p++)
      assert (int'(TAPS[p]) <= DIV_BITS) else $error("clock_module: tap beyond the counter");
  end
endmodule
