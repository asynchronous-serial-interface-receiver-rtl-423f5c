// lab6_pkg: constants and types shared by the serial-receiver display design.
//
// The frame format (8 data bits, 16 receiver clocks per bit, 9600 b/s) is the
// one the receiver is specified for. The 50 MHz board clock and the display
// scan rate are this design's own choices; they only set the clock dividers.
package lab6_pkg;

  // Serial frame: 8 data bits, sampled with 16 receiver clocks per bit.
  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned OVERSAMPLE = 16;
  localparam int unsigned BAUD       = 9600;

  // Board clock (clk50) and the division ratios derived from it.
  localparam int unsigned CLK50_HZ    = 50_000_000;
  // 50 MHz / 326 = 153.37 kHz, the closest integer ratio to 16 x 9600 = 153.6 kHz.
  localparam int unsigned RX_DIVISOR  = (CLK50_HZ + (OVERSAMPLE * BAUD) / 2) / (OVERSAMPLE * BAUD);
  // 50 MHz / 50000 = 1 kHz scan clock: each digit is lit for 1 ms, 250 Hz refresh.
  localparam int unsigned SCAN_DIVISOR = 50_000;

  // One hexadecimal display digit, and the four digits of the display
  // (index 3 is the leftmost digit).
  typedef logic [3:0] hex_digit_t;
  typedef hex_digit_t [3:0] hex_digits_t;

endpackage
