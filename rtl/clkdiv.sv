// clkdiv: integer clock divider.
//
// Produces a clock whose period is DIVISOR cycles of clk_in. A counter runs
// from 0 to DIVISOR-1 and wraps; the output is registered and is high for
// the first DIVISOR/2 input cycles of each period (50 % duty cycle for an
// even DIVISOR), so it is free of glitches. The design uses two of these:
// one brings the 50 MHz board clock down to the 153.6 kHz receiver clock
// (16 times 9600 b/s; 50 MHz / 326 = 153.37 kHz, 0.15 % slow), the other
// gives the display scan clock. The divider itself, its ratios and the
// board frequency are this design's choices; only the block and the
// receiver clock frequency are given.
//
// There is no reset: a counter value at or above DIVISOR-1 wraps to zero, so
// the divider reaches its normal sequence within one period from any
// power-up state. The output's first rising edge follows the counter's wrap.
module clkdiv #(
  parameter int unsigned DIVISOR = lab6_pkg::RX_DIVISOR
) (
  input  logic clk_in,
  output logic clk
);

  localparam int unsigned CW = (DIVISOR > 2) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_next;

  assign cnt_next = (cnt >= CW'(DIVISOR - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk_in) begin
    cnt <= cnt_next;
    clk <= (cnt_next < CW'(DIVISOR / 2));
  end

  initial begin
    assert (DIVISOR >= 2) else $error("clkdiv: DIVISOR must be at least 2");
  end

endmodule
