// tb_clkdiv: self-checking testbench for the clock divider.
//
// Runs the default divider (326, the receiver clock ratio) and a small odd
// ratio side by side, and after a settling period measures every output
// period and high time in input clock cycles: period must equal DIVISOR and
// high time DIVISOR/2.
module tb_clkdiv;

  localparam int unsigned DIV_A = 326;
  localparam int unsigned DIV_B = 7;

  logic clk_in = 1'b0;
  logic out_a, out_b;
  int unsigned checks = 0, failures = 0;

  clkdiv                    ua (.clk_in, .clk(out_a));
  clkdiv #(.DIVISOR(DIV_B)) ub (.clk_in, .clk(out_b));

  always #10 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Samples one divided clock after every input edge and checks the number
  // of input cycles between its rising edges and the cycles it stays high.
  task automatic measure(ref logic clk_out, input int unsigned div, input int unsigned n);
    bit          prev;
    int unsigned period, high, seen;
    prev = 1'b1;
    period = 0;
    high = 0;
    seen = 0;
    while (seen <= n) begin
      @(posedge clk_in);
      #1;
      if (clk_out && !prev) begin
        if (seen > 0) begin
          check(period == div, $sformatf("DIVISOR %0d: period %0d", div, period));
          check(high == div / 2, $sformatf("DIVISOR %0d: high for %0d cycles", div, high));
        end
        seen++;
        period = 0;
        high = 0;
      end
      period++;
      if (clk_out) high++;
      prev = clk_out;
    end
  endtask

  initial begin
    repeat (2 * DIV_A) @(posedge clk_in);
    fork
      measure(out_a, DIV_A, 20);
      measure(out_b, DIV_B, 50);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
