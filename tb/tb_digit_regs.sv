// tb_digit_regs: self-checking testbench for the digit registers.
//
// Sends a sequence of characters, each with a one-clock valid pulse and
// random gaps during which data changes without valid, and checks after
// every clock that the four digits hold the hex digits of the last two
// characters (newer one in digits[1:0]) and do not change without valid.
module tb_digit_regs;
  import lab6_pkg::*;

  logic        clk = 1'b0;
  logic        valid = 1'b0;
  logic [7:0]  data = '0;
  hex_digits_t digits;
  int unsigned checks = 0, failures = 0;

  digit_regs dut (.clk, .valid, .data, .digits);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] newest, older;

  initial begin
    newest = 8'h00;
    older  = 8'h00;
    // Two characters to fill the registers from their power-up contents.
    for (int k = 0; k < 60; k++) begin
      logic [7:0] ch;
      ch = (k == 0) ? 8'h35 : (k == 1) ? 8'h36 : 8'($urandom);
      @(negedge clk);
      data  = ch;
      valid = 1'b1;
      @(negedge clk);
      valid = 1'b0;
      older  = newest;
      newest = ch;
      data   = 8'($urandom);
      if (k >= 1) begin
        check(digits == {older, newest},
              $sformatf("digits %h, expected %h", digits, {older, newest}));
        if (k == 1) check(digits == 16'h3536, "'5','6' should show 3536");
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        data = 8'($urandom);
        if (k >= 1) check(digits == {older, newest}, "digits changed without valid");
      end
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
