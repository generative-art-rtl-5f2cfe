// tb_ws2812_bit_tx: checks the WS2812B bit encoder at its default 40 MHz timing.
//
// Feeds 200 random bits back to back and times every pulse on dout directly:
// a 0 must be high 16 cycles, a 1 high 32 cycles, and each bit must last exactly
// 50 cycles with no gap between bits. Also checks that dout rests low when idle,
// that a lone bit after a pause has the right shape, and the total time of the
// burst (200 * 50 cycles).
module tb_ws2812_bit_tx;
  import neopixel_pkg::*;

  localparam int unsigned NBITS = 200;

  logic clk = 1'b0, reset = 1'b1;
  logic in_valid = 1'b0, in_bit = 1'b0, in_ready, dout, busy;
  int   checks = 0, failures = 0;

  always #12.5ns clk = ~clk;

  ws2812_bit_tx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent pulse timer on the output.
  logic bits_q[$];
  int   hi = 0, period = 0, pulses = 0;
  logic prev = 1'b0;
  logic started = 1'b0;
  always @(posedge clk) begin
    if (reset) begin
      prev = 1'b0;
    end else if (dout && !prev) begin
      if (started) begin
        logic exp_prev;
        exp_prev = bits_q.pop_front();
        check(hi == (exp_prev ? 32 : 16), $sformatf("high time %0d for bit %0d", hi, exp_prev));
        check(period == 50, $sformatf("bit period %0d", period));
        pulses++;
      end
      started = 1'b1;
      hi = 0;
      period = 0;
    end
    if (!reset) begin
      if (dout) hi++;
      period++;
      prev = dout;
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(posedge clk);
    check(!dout && !busy && in_ready, "idle after reset");
    // back-to-back burst
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < NBITS; i++) begin
      in_valid = 1'b1;
      in_bit   = 1'($urandom_range(0, 1));
      bits_q.push_back(in_bit);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (busy) @(posedge clk);
    t1 = $time;
    // the last bit's high time has not been checked by the pulse timer yet
    check(bits_q.size() == 1, "one bit left after burst");
    check(hi == (bits_q[0] ? 32 : 16), "high time of last bit");
    check((t1 - t0) / 25 >= NBITS * 50 && (t1 - t0) / 25 <= NBITS * 50 + 2,
          $sformatf("burst length %0d cycles", (t1 - t0) / 25));
    check(pulses == NBITS - 1, "pulse count");
    void'(bits_q.pop_front());
    repeat (20) @(posedge clk);
    check(!dout, "line low after burst");
    // single 1 bit
    started = 1'b0;
    @(negedge clk);
    in_valid = 1'b1; in_bit = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (60) @(posedge clk);
    check(hi == 32, $sformatf("single 1 high time %0d", hi));
    check(!busy && !dout, "idle after single bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
