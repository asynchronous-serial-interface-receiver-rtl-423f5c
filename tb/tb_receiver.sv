// tb_receiver: self-checking testbench for the serial receiver.
//
// Phase 1 drives frames in step with the receiver clock (exactly 16 clocks
// per bit) and checks, for every frame, the received byte, that valid comes
// exactly m*(n+0.5)+1 = 137 clocks after the first clock that sees the start
// bit, that it is a single-clock pulse, and that led stays high for exactly
// m*(n+1.5) = 152 clocks per frame. Frames include the 8'h53 example, random
// bytes, random idle gaps and back-to-back frames (stop bit followed at once
// by the next start bit).
// Phase 2 drives frames asynchronously to the clock, with bit periods 4 %
// shorter and longer than 16 clocks and random phase, and checks the bytes.
// Expected values come from the transmitted bytes only.
module tb_receiver;

  localparam int unsigned N = 8;
  localparam int unsigned M = 16;
  localparam int unsigned LATENCY = M * N + M / 2 + 1;   // 137
  localparam int unsigned BUSY    = M * N + M + M / 2;   // 152
  localparam int unsigned TCLK_NS = 100;                 // clock period
  localparam int unsigned TBIT_NS = M * TCLK_NS;         // nominal bit period

  logic         clk = 1'b0;
  logic         rxd = 1'b1;
  logic [N-1:0] data;
  logic         valid;
  logic         led;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit          sync_phase = 1'b1;

  receiver #(.DATA_BITS(N), .OVERSAMPLE(M)) dut (
    .clk, .rxd, .data, .valid, .led
  );

  always #(TCLK_NS / 2) clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected frames: byte and, in phase 1, the first clock seeing the start bit.
  logic [N-1:0] exp_byte[$];
  int unsigned  exp_edge[$];
  int unsigned  frames_sent = 0, frames_got = 0;
  int unsigned  led_cycles = 0, sync_frames = 0;
  bit           prev_valid = 1'b0;
  bit           monitor_on = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Monitor, sampling in the middle of each clock period.
  always @(negedge clk) begin
    if (monitor_on) begin
      if (sync_phase && led) led_cycles++;
      if (valid) begin
        check(!prev_valid, "valid high for more than one clock");
        if (exp_byte.size() == 0) begin
          check(1'b0, "valid without a frame");
        end else begin
          logic [N-1:0] eb;
          int unsigned  ee;
          eb = exp_byte.pop_front();
          ee = exp_edge.pop_front();
          check(data == eb, $sformatf("data %02h, expected %02h", data, eb));
          if (sync_phase)
            check(cyc == ee + LATENCY,
                  $sformatf("valid at %0d clocks after start, expected %0d", cyc - ee, LATENCY));
          frames_got++;
        end
      end
      prev_valid = valid;
    end
  end

  // Phase 1 transmitter: rxd changes on the falling clock edge.
  task automatic send_sync(input logic [N-1:0] b);
    logic [N+1:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk);
    exp_byte.push_back(b);
    exp_edge.push_back(cyc + 1);
    frames_sent++;
    sync_frames++;
    for (int i = 0; i < N + 2; i++) begin
      rxd = frame[i];
      if (i < N + 1) repeat (M) @(negedge clk);
    end
    repeat (M - 1) @(negedge clk);   // rest of the stop bit
  endtask

  // Waits a number of nanoseconds in 1 ns steps.
  task automatic wait_ns(input int unsigned ns);
    repeat (ns) #1;
  endtask

  // Phase 2 transmitter, bit period tbit_ns nanoseconds.
  task automatic send_async(input logic [N-1:0] b, input int unsigned tbit_ns);
    logic [N+1:0] frame;
    frame = {1'b1, b, 1'b0};
    exp_byte.push_back(b);
    exp_edge.push_back(0);
    frames_sent++;
    for (int i = 0; i < N + 2; i++) begin
      rxd = frame[i];
      wait_ns(tbit_ns);
    end
  endtask

  initial begin
    // Power-up: no reset; the counter drains to zero by itself.
    repeat (300) @(negedge clk);
    check(led == 1'b0, "receiver not idle after power-up");
    monitor_on = 1'b1;

    // Phase 1.
    send_sync(8'h53);
    repeat (20) @(negedge clk);
    send_sync(8'h00);
    send_sync(8'hFF);                // back to back
    send_sync(8'hA5);
    repeat (3) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      send_sync(8'($urandom));
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    check(frames_got == frames_sent, $sformatf("phase 1: %0d frames, %0d received", frames_sent, frames_got));
    check(led_cycles == BUSY * sync_frames,
          $sformatf("led high %0d clocks, expected %0d", led_cycles, BUSY * sync_frames));
    check(exp_byte.size() == 0, "phase 1 frames left unreceived");

    // Phase 2.
    sync_phase = 1'b0;
    for (int k = 0; k < 60; k++) begin
      int unsigned tbit_ns;
      tbit_ns = (k % 3 == 0) ? TBIT_NS * 96 / 100 : (k % 3 == 1) ? TBIT_NS * 104 / 100 : TBIT_NS;
      wait_ns($urandom_range(0, TCLK_NS - 1));
      send_async(8'($urandom), tbit_ns);
      if ($urandom_range(0, 1) == 1) wait_ns($urandom_range(0, 30) * TCLK_NS);
    end
    repeat (200) @(negedge clk);
    check(frames_got == frames_sent, $sformatf("all: %0d frames, %0d received", frames_sent, frames_got));
    check(exp_byte.size() == 0, "frames left unreceived");

    $display("frames sent %0d, received %0d", frames_sent, frames_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
