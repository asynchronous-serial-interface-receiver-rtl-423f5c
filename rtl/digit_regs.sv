// digit_regs: holds the last two received characters as four hex digits.
//
// Four 4-bit registers, all enabled by the receiver's one-clock valid pulse.
// On each valid the new character's low and high nibbles are written to
// digits[0] and digits[1], and the previous contents of digits[0] and
// digits[1] move to digits[2] and digits[3]. With digits[3] as the leftmost
// display digit, the display reads as the two-digit hex codes of the last
// two characters, older one on the left: after "...56" it shows 3536.
// The registers, their names and the nibble split follow the original
// netlist; which register feeds which display position is this design's
// choice, made so that the display reads in arrival order.
//
// Timing: digits change on the clock edge on which valid is sampled high;
// no reset (the display shows whatever the registers power up with until
// two characters have arrived).
module digit_regs
  import lab6_pkg::*;
(
  input  logic        clk,
  input  logic        valid,
  input  logic [7:0]  data,
  output hex_digits_t digits
);

  always_ff @(posedge clk) begin
    if (valid) begin
      digits[0] <= data[3:0];
      digits[1] <= data[7:4];
      digits[2] <= digits[0];
      digits[3] <= digits[1];
    end
  end

endmodule
