// tb_display: self-checking testbench for the multiplexed display driver.
//
// Loads random hex digits and, over several scan rounds, checks that
// exactly one digit-select line is active at a time, that the selected
// position advances 0,1,2,3,0,... by one per scan clock, and that a..g carry
// the seven-segment pattern of the selected digit. The reference patterns
// are written out below as the segments each hex character lights.
module tb_display;
  import lab6_pkg::*;

  logic        clk = 1'b0;
  hex_digits_t digit;
  logic        a, b, c, d, e, f, g;
  logic [3:0]  ct;
  int unsigned checks = 0, failures = 0;

  display dut (.clk, .digit, .a, .b, .c, .d, .e, .f, .g, .ct);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Lit segments of each hex character, as letters.
  function automatic string lit(input hex_digit_t h);
    case (h)
      4'h0: return "abcdef";
      4'h1: return "bc";
      4'h2: return "abdeg";
      4'h3: return "abcdg";
      4'h4: return "bcfg";
      4'h5: return "acdfg";
      4'h6: return "acdefg";
      4'h7: return "abc";
      4'h8: return "abcdefg";
      4'h9: return "abcdfg";
      4'hA: return "abcefg";
      4'hB: return "cdefg";
      4'hC: return "adef";
      4'hD: return "bcdeg";
      4'hE: return "adefg";
      default: return "aefg";
    endcase
  endfunction

  function automatic string now_lit();
    string s;
    s = "";
    if (a) s = {s, "a"};
    if (b) s = {s, "b"};
    if (c) s = {s, "c"};
    if (d) s = {s, "d"};
    if (e) s = {s, "e"};
    if (f) s = {s, "f"};
    if (g) s = {s, "g"};
    return s;
  endfunction

  int pos, prev_pos;

  initial begin
    prev_pos = -1;
    for (int round = 0; round < 24; round++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) digit[i] = (round < 4) ? hex_digit_t'(4 * round + i) : hex_digit_t'($urandom);
      for (int step = 0; step < 4; step++) begin
        #1;
        pos = -1;
        for (int i = 0; i < 4; i++) if (ct[i]) pos = i;
        check($countones(ct) == 1, $sformatf("ct = %b, one line expected", ct));
        if (prev_pos >= 0) check(pos == (prev_pos + 1) % 4, $sformatf("scan went %0d -> %0d", prev_pos, pos));
        if (pos >= 0)
          check(now_lit() == lit(digit[pos]),
                $sformatf("digit %0d = %h shows %s, expected %s", pos, digit[pos], now_lit(), lit(digit[pos])));
        prev_pos = pos;
        @(negedge clk);
      end
      prev_pos = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
