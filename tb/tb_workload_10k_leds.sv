// tb_workload_10k_leds: 24 strips of 417 pixels (10 008 LEDs) refreshed at 60 Hz.
//
// Builds the driver with STRIP_LENGTH = 417, loads a random frame into every
// strip over SPI (here at sclk = clk/8 to keep the run short), flushes, and
// decodes all 24 lines with behavioural WS2812B receivers. Checks that every
// strip shows its 1251 bytes with correct pulse timing, and that the refresh
// (417*24*50 + 2000 = 502 400 cycles, 12.56 ms at 40 MHz) fits inside one frame
// period at 60 frames per second (666 666 cycles).
module tb_workload_10k_leds;
  import neopixel_pkg::*;

  localparam int unsigned NS        = 24;
  localparam int unsigned LEN       = 417;
  localparam int unsigned NBYTES    = 3 * LEN;
  localparam int unsigned EXPECT    = NBYTES * 8 * 50 + 2000;
  localparam int unsigned FRAME_CYC = 40_000_000 / 60;
  localparam int unsigned HALF      = 4;

  logic          clk = 1'b0, reset = 1'b1;
  logic          sclk = 1'b0, mosi = 1'b0, cs = 1'b0;
  logic [NS-1:0] pixels;
  logic          flushing;
  int checks = 0, failures = 0, cyc = 0;
  int t_rise = 0, t_fall = 0;
  logic flushing_q = 1'b0;
  logic [7:0] image [NS][NBYTES];

  always #12.5ns clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (flushing && !flushing_q) t_rise = cyc;
    if (!flushing && flushing_q) t_fall = cyc;
    flushing_q = flushing;
  end

  neopixel_driver #(.STRIP_LENGTH(LEN)) dut (
    .clk(clk), .reset(reset), .sclk(sclk), .mosi(mosi), .cs(cs),
    .pixels(pixels), .flushing(flushing));

  logic [7:0]  rx_all [NS][NBYTES];
  int unsigned frames [NS], nbytes [NS], bad [NS], bits [NS];

  for (genvar i = 0; i < NS; i++) begin : g_rx
    ws2812_strip_model #(.MAX_BYTES(NBYTES)) rxm (.clk(clk), .din(reset ? 1'b0 : pixels[i]),
      .rx(rx_all[i]), .frames(frames[i]), .last_frame_bytes(nbytes[i]), .bad_pulses(bad[i]),
      .bits_total(bits[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic spi_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (HALF) @(negedge clk);
      sclk = 1'b1;
      repeat (HALF) @(negedge clk);
      sclk = 1'b0;
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      cs = 1'b1;
      repeat (HALF) @(negedge clk);
      spi_byte(8'(s));
      spi_byte(8'd0);
      for (int b = 0; b < NBYTES; b++) begin
        image[s][b] = 8'($urandom);
        spi_byte(image[s][b]);
      end
      repeat (HALF) @(negedge clk);
      cs = 1'b0;
      repeat (2 * HALF) @(negedge clk);
    end
    cs = 1'b1;
    repeat (HALF) @(negedge clk);
    spi_byte(8'h46);
    cs = 1'b0;
    while (!flushing) @(posedge clk);
    while (flushing) @(posedge clk);
    repeat (10) @(posedge clk);
    check(t_fall - t_rise >= EXPECT && t_fall - t_rise <= EXPECT + 6,
          $sformatf("refresh took %0d cycles, expected %0d", t_fall - t_rise, EXPECT));
    check(t_fall - t_rise < FRAME_CYC,
          $sformatf("refresh %0d cycles exceeds a 60 Hz frame (%0d)", t_fall - t_rise, FRAME_CYC));
    for (int s = 0; s < NS; s++) begin
      check(frames[s] == 1 && nbytes[s] == NBYTES && bad[s] == 0,
            $sformatf("strip %0d: frames %0d bytes %0d pulse errors %0d", s, frames[s], nbytes[s], bad[s]));
      for (int b = 0; b < NBYTES; b++)
        check(rx_all[s][b] == image[s][b],
              $sformatf("strip %0d byte %0d: %h expected %h", s, b, rx_all[s][b], image[s][b]));
    end
    $display("refresh of %0d LEDs: %0d cycles (%0d us)", NS * LEN, t_fall - t_rise,
             (t_fall - t_rise) / 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
