// lab6: serial receiver with a four-digit hexadecimal display.
//
// Characters arriving on rxd (9600 b/s, 8 data bits, no parity, one stop
// bit, line idle high) are received and the hex codes of the last two are
// shown on a multiplexed four-digit seven-segment display, the older
// character on the left: receiving "A00123456" leaves 3536 ('5' = 8'h35,
// '6' = 8'h36) on the display.
//
// Structure, as in the original netlist:
//   clk50 -> clkdiv c0 -> receiver clock (16 x 9600 = 153.6 kHz nominal)
//   rxd   -> receiver r0 -> data / valid -> digit_regs (four hex digits)
//   clk50 -> clkdiv c1 -> display scan clock -> display d0 -> a..g, ct[3:0]
//   receiver led (high while a character is being received) -> led
// The 50 MHz board clock, the two division ratios and the display scan
// scheme are this design's choices (see clkdiv and display).
//
// The digit registers are written in the receiver clock domain and read by
// the display in the scan clock domain. No synchroniser is used: a digit
// may show a mixed value for at most one 1 ms scan slot after a change,
// which is invisible on an LED display.
//
// 14 pins: clk50, rxd, led, a..g, ct[3:0]. No reset pin; every register
// reaches its normal sequence by itself after power-up (see receiver).
module lab6
  import lab6_pkg::*;
#(
  parameter int unsigned RX_DIV   = lab6_pkg::RX_DIVISOR,
  parameter int unsigned SCAN_DIV = lab6_pkg::SCAN_DIVISOR
) (
  input  logic       clk50,
  input  logic       rxd,
  output logic       a,
  output logic       b,
  output logic       c,
  output logic       d,
  output logic       e,
  output logic       f,
  output logic       g,
  output logic [3:0] ct,
  output logic       led
);

  logic                 rx_clk;
  logic                 scan_clk;
  logic [DATA_BITS-1:0] rx_data;
  logic                 rx_valid;
  hex_digits_t          digits;

  clkdiv #(.DIVISOR(RX_DIV)) c0 (
    .clk_in (clk50),
    .clk    (rx_clk)
  );

  receiver #(.DATA_BITS(DATA_BITS), .OVERSAMPLE(OVERSAMPLE)) r0 (
    .clk   (rx_clk),
    .rxd   (rxd),
    .data  (rx_data),
    .valid (rx_valid),
    .led   (led)
  );

  digit_regs dr (
    .clk    (rx_clk),
    .valid  (rx_valid),
    .data   (rx_data),
    .digits (digits)
  );

  clkdiv #(.DIVISOR(SCAN_DIV)) c1 (
    .clk_in (clk50),
    .clk    (scan_clk)
  );

  display d0 (
    .clk   (scan_clk),
    .digit (digits),
    .a     (a),
    .b     (b),
    .c     (c),
    .d     (d),
    .e     (e),
    .f     (f),
    .g     (g),
    .ct    (ct)
  );

endmodule
