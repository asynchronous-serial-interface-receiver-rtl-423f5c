# Serial receiver with hexadecimal display

This design receives characters from an asynchronous serial line and shows
the hex codes of the last two on a four-digit seven-segment display. The line
runs at 9600 b/s with 8 data bits, no parity and one stop bit. It was made
for a small CPLD (an EPM240-class device). Send `A00123456` and the display
reads `3536`: the codes of `'5'` (8'h35) and `'6'` (8'h36), older character
on the left.

The receiver is the core of the design. It needs no baud-rate state machine:
one down-counter, clocked at 16 times the bit rate, does all the timing. A
falling edge on the idle line starts the counter. The value of the counter
then marks every point in the frame where something has to happen.

## The serial frame

```
 idle  start  d0  d1  d2  d3  d4  d5  d6  d7  stop  idle
 ----\_______/XXX/XXX/XXX/XXX/XXX/XXX/XXX/XXX/-------------
```

- The line is high between characters.
- A character starts with a `0` start bit.
- The 8 data bits follow, least significant first. A high level is a `1`.
- A `1` stop bit ends the character.

This is the logic-level (TTL-UART) polarity, which is inverted from RS-232
voltages. Each bit lasts 16 receiver clocks (m = 16). The receiver clock is
nominally 16 × 9600 = 153.6 kHz.

## The counter schedule (`rtl/receiver.sv`)

The receiver has these registers:

- `last`: rxd one clock ago. It is used to find the falling edge.
- `count`: the down-counter.
- `data`: the 8-bit shift register.
- `valid`: the output pulse.

It works by these rules:

1. **Start.** The counter is zero and `last = 1, rxd = 0` (a falling edge).
   The counter is loaded with m·(n + 1.5) = 16 · 9.5 = 152 = 8'h98. Here
   n = 8 is the number of data bits.
2. **Run.** While the counter is not zero it counts down by one each clock.
   It reaches zero in the middle of the stop bit. So the receiver is busy for
   the start bit, the 8 data bits and half of the stop bit. It then waits for
   the next edge. A stop bit only has to last half a bit, which leaves time
   for back-to-back characters.
3. **Sample.** On every clock where the low four bits of the counter are zero,
   rxd is shifted into the most significant bit of `data`. The load value
   is 8 counts above a multiple of 16. The first such point therefore comes
   half a bit after the edge, in the middle of the start bit. Every later
   point comes one bit later, in the middle of a data bit.
4. **Done.** When the counter is 8'h10, the last data bit is shifted in, and
   `valid` is set for the next clock.

This table counts clocks from edge E, the first clock edge that sees rxd low:

| counter before the edge | clock edge | event                                 |
|-------------------------|------------|---------------------------------------|
| 0, rxd falling          | E          | counter loaded with 8'h98             |
| 8'h90                   | E+9        | start bit shifted in                  |
| 8'h80                   | E+25       | d0 shifted in                         |
| 8'h70 … 8'h20           | E+41 … E+121 | d1 … d6 shifted in                  |
| 8'h10                   | E+137      | d7 shifted in, `valid` set            |
| 8'h01                   | E+152      | counter reaches 0, receiver idle      |

Nine shifts go into an 8-bit register. So the start bit falls out of the
bottom again, and d0 ends up in bit 0. `valid` is high for exactly the clock
after E+137. That is the clock in which `data` holds the whole character.

`led` is high while the counter is not zero. It shows on an oscilloscope how
long each character keeps the receiver busy (152 clocks, about 0.99 ms).

### Things to know about the receiver

- **`data` is only meaningful while `valid` is high.** The shift rule also
  applies when the counter sits at zero. An idle receiver therefore keeps
  shifting the line level (ones) into `data`. Capture `data` on `valid`, as
  the digit registers do.
- **Sampling point.** rxd is sampled 8.5 to 9.5 clocks after it actually
  fell. That is up to one clock past the true centre of each bit, because
  edge detection takes up to one clock.
- **Baud-rate tolerance.** The last data bit is sampled about 8.5 bit times
  after the edge, so a slow sender can be about 5 % off before that sample
  leaves its bit. A fast sender is limited a little more, to about 4 %: with
  characters sent back to back, the next start bit must come after the
  receiver is idle again (152 clocks after the edge). The top level's
  50 MHz / 326 divider gives 153.37 kHz, which is 0.15 % slow.
- **No framing or noise checks.** The stop bit is not checked. A glitch on
  the idle line starts a reception. Parity is not supported.
- **No synchroniser.** rxd goes straight into the edge-detect register and
  the shift register. At 153.6 kHz the metastability risk is very small, but
  add a flip-flop in front of `last` if your clock is fast.
- **No reset.** CPLD registers power up cleared. From any other start value
  the counter runs down to zero by itself within 255 clocks (1.7 ms). While
  it does, it may pass 8'h10 and give one stray `valid`.
- **Parameters.** `DATA_BITS` (8) and `OVERSAMPLE` (16) are generic. The
  "low bits zero" test needs `OVERSAMPLE` to be a power of two, and an
  elaboration-time assertion checks this. The counter width follows from
  m·(n + 1.5).

## Clocks (`rtl/clkdiv.sv`)

The board clock `clk50` is taken to be 50 MHz. Two dividers run from it:

| instance | DIVISOR | output    | used by                          |
|----------|---------|-----------|----------------------------------|
| `c0`     | 326     | 153.37 kHz | receiver and digit registers    |
| `c1`     | 50 000  | 1 kHz     | display scan                     |

Each divider is a counter that wraps at `DIVISOR - 1`. Its output is
registered and stays high for the first `DIVISOR/2` cycles. The outputs are
used as real clocks, which is normal for a CPLD of this size. The ratio for
`c0` is computed in `lab6_pkg` from `CLK50_HZ`, `BAUD` and `OVERSAMPLE`. For a
different board oscillator, change `CLK50_HZ` there.

## Display path (`rtl/digit_regs.sv`, `rtl/display.sv`)

`digit_regs` is four 4-bit registers, all enabled by `valid`:

- `digits[1:0]` take the new character's high and low nibbles.
- `digits[3:2]` take the old contents of `digits[1:0]`.

`digits[3]` is the leftmost position. The display therefore shows the older
character on the left and the newer one on the right.

`display` multiplexes the four digits. A 2-bit counter advances on each scan
clock and makes one of `ct[3:0]` active. The segment lines `a`..`g` carry the
pattern of the selected digit: 0-9, A, b, C, d, E, F. At 1 kHz each digit is
lit 1 ms in 4, a 250 Hz refresh. Two parameters set the polarities,
`SEG_ACTIVE_HIGH` and `CT_ACTIVE_HIGH`. Both default to active high. Set them
to match your display and its driver transistors.

The digit registers change in the receiver clock domain. The display reads
them in the scan clock domain. No synchroniser is used. At worst a digit
shows a mixed value for one 1 ms slot.

## Top level (`rtl/lab6.sv`)

```
clk50 ─┬─ clkdiv c0 ── rx_clk ──┬─ receiver r0 ── data, valid ── digit_regs ── digits
       │                        │        └─ led ───────────────────────────────── led
rxd ───┼────────────────────────┘                                        │
       └─ clkdiv c1 ── scan_clk ─────────── display d0 ◄──────────────────┘
                                                └── a b c d e f g, ct[3:0]
```

There are 14 pins: `clk50`, `rxd`, `led`, `a`..`g` and `ct[3:0]`. The
parameters `RX_DIV` and `SCAN_DIV` override the two division ratios.

## Where this design makes its own choices

The receiver follows a known counter scheme exactly: the load value, the
shift points, MSB-first shifting, the `valid` timing and the single
edge-detect register. This design chose:

- the 50 MHz board clock and both division ratios;
- the divider circuit;
- the whole display driver: scan order, segment patterns and polarities;
- how the digit registers are chained to display positions;
- using `led` to show "receiver busy" (any troubleshooting signal would do);
- leaving out a reset.

Some behaviour is left out on purpose:

- a second display mode that shows the low nibbles of the last four
  characters;
- pin assignments (rxd on pin 26, led on pin 77 on the original board),
  which belong in the FPGA/CPLD tool's constraints.

## Simulation

Every testbench in `tb/` checks itself. It prints one
`TB_RESULT checks=N failures=M` line and ends with `$finish`.

| testbench        | what it exercises |
|------------------|-------------------|
| `tb_receiver`    | 8'h53 and random bytes, clock-synchronous with exactly 16 clocks per bit: checks each byte, that `valid` comes exactly 137 clocks after the start edge and lasts one clock, that `led` stays high for 152 clocks per frame, back-to-back frames and idle gaps. Then it sends frames asynchronously with bit periods 4 % short and 4 % long, random phase and back-to-back frames. |
| `tb_clkdiv`      | Period and high time of the default (326) and an odd (7) divider. |
| `tb_digit_regs`  | Shifting of the last two characters, and that nothing changes without `valid`. |
| `tb_display`     | One-hot `ct`, scan order, and the segment pattern of every hex value. |
| `tb_lab6`        | Whole design at its default parameters. A 9600 b/s sender model transmits `A00123456`, `S`, `56`. The testbench decodes the display pins and checks `4130`, `3536`, `3653`, `3536`. It counts start detections, `valid` pulses, back-to-back and after-idle characters, and scans of each position. Simulated time is about 45 ms; run time is about 1 s. |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/lab6_pkg.sv tb/tb_lab6.sv --top-module tb_lab6
./obj_dir/Vtb_lab6 +verilator+rand+reset+2
```

Use `+verilator+rand+reset+2` to start the registers at random values, as
real power-up would. The testbenches wait for the no-reset design to settle
before they check anything.
