// tb_lab6: end-to-end testbench of the serial receiver with display, at the
// design's default parameters (50 MHz board clock, 9600 b/s).
//
// A serial transmitter model (8 data bits, no parity, one stop bit, line
// idle high, bit period 1/9600 s, not tied to any design clock) sends the
// string "A00123456" with characters back to back, then "S" (8'h53) after
// an idle gap and then "56" again. The test reads the multiplexed display
// from its pins over full scan rounds, decodes the segment patterns and
// checks that it shows the hex codes of the last two characters: 4130 after
// "A0", 3536 after "A00123456", 3653 after "S", 3536 at the end. Each
// received character is also checked at the receiver's valid pulse.
//
// Mechanisms counted (each must occur): start-bit detection (led rising),
// valid pulses, characters received back to back (next start bit within
// one bit time of the previous valid), idle line between characters, and
// every display position being scanned.
module tb_lab6;

  localparam real TBIT = 1.0e9 / 9600.0;   // ns per bit

  logic       clk50 = 1'b0;
  logic       rxd = 1'b1;
  logic       a, b, c, d, e, f, g, led;
  logic [3:0] ct;

  int unsigned checks = 0, failures = 0;

  lab6 dut (.clk50, .rxd, .a, .b, .c, .d, .e, .f, .g, .ct, .led);

  always #10 clk50 = ~clk50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- sender
  logic [7:0] sent[$];
  realtime    last_stop_end;
  int unsigned n_back_to_back = 0, n_after_idle = 0;

  task automatic send_char(input logic [7:0] ch);
    logic [9:0] frame;
    frame = {1'b1, ch, 1'b0};
    sent.push_back(ch);
    if ($realtime - last_stop_end < 1.0) n_back_to_back++;
    else n_after_idle++;
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      #(TBIT);
    end
    last_stop_end = $realtime;
  endtask

  task automatic send_string(input string s);
    for (int i = 0; i < s.len(); i++) send_char(s[i]);
  endtask

  // --------------------------------------------------------------- monitor
  int unsigned n_valid = 0, n_start = 0;
  logic [7:0]  got[$];
  bit          led_q = 1'b0;

  always @(posedge dut.rx_clk) begin
    led_q <= led;
    if (led && !led_q && sent.size() > 0) n_start++;
  end

  always @(negedge dut.rx_clk) begin
    // Counted from the first character on: with no reset, a counter that
    // powers up with a non-zero value drains through the valid count once.
    if (dut.rx_valid && sent.size() > 0) begin
      n_valid++;
      got.push_back(dut.rx_data);
      if (sent.size() < n_valid) check(1'b0, "valid without a character");
      else check(dut.rx_data == sent[n_valid-1],
                 $sformatf("character %0d: got %02h, sent %02h", n_valid, dut.rx_data, sent[n_valid-1]));
    end
  end

  // --------------------------------------------------------- display reader
  int unsigned pos_seen[4];

  function automatic int seg_value();
    string s;
    string pat[16];
    pat = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
            "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    s = "";
    if (a) s = {s, "a"};
    if (b) s = {s, "b"};
    if (c) s = {s, "c"};
    if (d) s = {s, "d"};
    if (e) s = {s, "e"};
    if (f) s = {s, "f"};
    if (g) s = {s, "g"};
    for (int i = 0; i < 16; i++) if (s == pat[i]) return i;
    return -1;
  endfunction

  // Watches the pins for two full scan rounds and returns what each position
  // showed (the value seen on the last visit).
  task automatic read_display(output logic [15:0] shown, output bit ok);
    int val[4];
    ok = 1'b1;
    for (int i = 0; i < 4; i++) val[i] = -1;
    repeat (8) begin
      @(posedge dut.scan_clk);
      #100;
      for (int i = 0; i < 4; i++) begin
        if (ct == (4'b0001 << i)) begin
          val[i] = seg_value();
          pos_seen[i]++;
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      if (val[i] < 0) ok = 1'b0;
      shown[4*i +: 4] = 4'(val[i]);
    end
  endtask

  task automatic expect_display(input logic [15:0] want);
    logic [15:0] shown;
    bit          ok;
    read_display(shown, ok);
    check(ok, "a display position showed no valid hex pattern");
    check(shown == want, $sformatf("display shows %h, expected %h", shown, want));
    $display("display shows %h", shown);
  endtask

  // ------------------------------------------------------------------ test
  initial begin
    last_stop_end = -1.0e9;
    // Line idle while the receiver counter settles after power-up
    // (at most 255 receiver clocks, 16.6 bit times).
    #(20 * TBIT);
    check(led == 1'b0, "receiver busy with an idle line");

    send_string("A0");
    #(TBIT);
    expect_display(16'h4130);

    send_string("0123456");
    #(TBIT);
    expect_display(16'h3536);

    #(5 * TBIT);
    send_char(8'h53);
    #(TBIT);
    expect_display(16'h3653);

    send_string("56");
    #(TBIT);
    expect_display(16'h3536);

    check(n_valid == sent.size(), $sformatf("%0d characters sent, %0d received", sent.size(), n_valid));
    check(n_start == sent.size(), $sformatf("%0d characters sent, %0d start bits detected", sent.size(), n_start));

    $display("start bits %0d, valid pulses %0d, back-to-back %0d, after idle %0d, scans %0d/%0d/%0d/%0d",
             n_start, n_valid, n_back_to_back, n_after_idle,
             pos_seen[0], pos_seen[1], pos_seen[2], pos_seen[3]);
    check(n_start > 0, "no start bit detected");
    check(n_valid > 0, "no valid pulse");
    check(n_back_to_back > 0, "no back-to-back characters");
    check(n_after_idle > 0, "no character after an idle line");
    for (int i = 0; i < 4; i++) check(pos_seen[i] > 0, $sformatf("display position %0d never scanned", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk50);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
