// display: multiplexed driver for a four-digit seven-segment LED display.
//
// The four digits share the segment lines a..g; one digit-select line
// ct[i] is active at a time. A 2-bit scan counter advances on every scan
// clock edge and selects digit[i]; the digit's value is decoded to the
// usual hexadecimal segment pattern (0-9, A, b, C, d, E, F). ct[i] selects
// display position i, position 3 being the leftmost. With the 1 kHz scan
// clock of the top level each digit is lit for 1 ms, 250 Hz per digit.
//
// Only the block, its inputs and its a..g and ct[3:0] outputs are given for
// this design; the scan scheme, the segment patterns and the polarities
// (parameters, active high by default) are this design's choices and must
// match the display that is wired up.
//
// Timing: ct and a..g change together, one scan clock after the counter
// register updates (they are decoded from the counter and digit inputs).
module display
  import lab6_pkg::*;
#(
  parameter bit SEG_ACTIVE_HIGH = 1'b1,
  parameter bit CT_ACTIVE_HIGH  = 1'b1
) (
  input  logic        clk,
  input  hex_digits_t digit,
  output logic        a,
  output logic        b,
  output logic        c,
  output logic        d,
  output logic        e,
  output logic        f,
  output logic        g,
  output logic [3:0]  ct
);

  // Segment pattern {a,b,c,d,e,f,g}, 1 = lit.
  function automatic logic [6:0] hex_to_seg(input hex_digit_t h);
    unique case (h)
      4'h0: return 7'b1111110;
      4'h1: return 7'b0110000;
      4'h2: return 7'b1101101;
      4'h3: return 7'b1111001;
      4'h4: return 7'b0110011;
      4'h5: return 7'b1011011;
      4'h6: return 7'b1011111;
      4'h7: return 7'b1110000;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1111011;
      4'hA: return 7'b1110111;
      4'hB: return 7'b0011111;
      4'hC: return 7'b1001110;
      4'hD: return 7'b0111101;
      4'hE: return 7'b1001111;
      4'hF: return 7'b1000111;
    endcase
  endfunction

  logic [1:0] sel;
  logic [6:0] seg;
  logic [3:0] sel_onehot;

  always_ff @(posedge clk) begin
    sel <= sel + 1'b1;
  end

  always_comb begin
    seg        = hex_to_seg(digit[sel]);
    sel_onehot = 4'b0001 << sel;
  end

  assign {a, b, c, d, e, f, g} = SEG_ACTIVE_HIGH ? seg : ~seg;
  assign ct = CT_ACTIVE_HIGH ? sel_onehot : ~sel_onehot;

endmodule
