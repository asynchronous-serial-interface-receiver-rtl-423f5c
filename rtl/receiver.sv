// receiver: asynchronous serial (UART) receiver, 8 data bits, 1 stop bit.
//
// Frame on rxd: line idle high, one start bit (0), DATA_BITS data bits LSB
// first, one stop bit (1). clk runs at OVERSAMPLE times the bit rate
// (16 x 9600 = 153.6 kHz by default).
//
// How it works. A single down-counter is the whole controller. While the
// counter is zero the receiver is idle; when rxd is seen falling (the
// registered previous rxd value `last` is 1 and rxd is 0) the counter is
// loaded with m*(n+1.5) (m = OVERSAMPLE, n = DATA_BITS: 16*9.5 = 152 = 8'h98)
// and then counts down by one per clock until it is zero again, which is the
// middle of the stop bit. Every time the low log2(m) bits of the counter are
// zero, rxd is shifted into the most significant bit of the data register.
// With the load value chosen this way those instants fall in the middle of
// the start bit (8'h90) and of each data bit (8'h80, 8'h70, ... 8'h10), so the
// start bit is shifted out again and the first data bit ends in bit 0. valid
// is a register set when the counter is m (8'h10), the moment the last data
// bit is shifted in, so it is high for the one clock in which data holds the
// complete character. led is high while the counter runs.
//
// This follows the counter scheme, the load and shift values, the edge
// detector register and the valid and led outputs described for this
// receiver. As described, the shift also happens on every clock while the
// receiver is idle (counter zero), so data is only meaningful while valid
// is high. Design choices of this implementation: there is no reset, since
// the CPLD registers power up cleared and the counter returns to zero by
// itself within 2**CW clocks from any state; OVERSAMPLE must be a power of
// two so that "low bits zero" marks a bit centre; rxd is sampled without an
// extra synchroniser stage, as in the original netlist (the edge detector
// register is the only one).
//
// Timing: if rxd is first seen low at clock edge E, the counter is loaded at
// E, the start bit is sampled at E+m/2+1, the last data bit at E+m*(n+0.5)+1
// (E+137), where valid also rises for one clock, and the receiver is idle
// again after E+m*(n+1.5) (E+152), ready for the next start bit.
module receiver #(
  parameter int unsigned DATA_BITS  = lab6_pkg::DATA_BITS,
  parameter int unsigned OVERSAMPLE = lab6_pkg::OVERSAMPLE
) (
  input  logic                 clk,
  input  logic                 rxd,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid,
  output logic                 led
);

  // Counter load value m*(n+1.5) and the width needed to hold it.
  localparam int unsigned START = OVERSAMPLE * DATA_BITS + OVERSAMPLE + OVERSAMPLE / 2;
  localparam int unsigned CW    = $clog2(START + 1);
  localparam int unsigned LW    = $clog2(OVERSAMPLE);

  logic [CW-1:0] count;
  logic          last;      // rxd one clock ago, for the falling-edge detector
  logic          fall;      // falling edge on rxd
  logic          idle;      // counter is zero
  logic          bit_centre;

  assign idle       = (count == '0);
  assign fall       = last & ~rxd;
  assign bit_centre = (count[LW-1:0] == '0);

  always_ff @(posedge clk) begin
    last <= rxd;
  end

  // Controller: load at a falling edge while idle, else count down to zero.
  always_ff @(posedge clk) begin
    if (idle) begin
      if (fall) count <= CW'(START);
    end else begin
      count <= count - 1'b1;
    end
  end

  // Datapath: shift register, new bit into the MSB at each bit centre.
  always_ff @(posedge clk) begin
    if (bit_centre) data <= {rxd, data[DATA_BITS-1:1]};
  end

  always_ff @(posedge clk) begin
    valid <= (count == CW'(OVERSAMPLE));
  end

  assign led = ~idle;

  // The bit-centre test only works when OVERSAMPLE is a power of two.
  initial begin
    assert (OVERSAMPLE >= 2 && (OVERSAMPLE & (OVERSAMPLE - 1)) == 0)
      else $error("receiver: OVERSAMPLE must be a power of two, got %0d", OVERSAMPLE);
  end

endmodule
