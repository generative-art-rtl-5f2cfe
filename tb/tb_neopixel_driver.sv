// tb_neopixel_driver: end-to-end test of the 24-strip driver at its default size.
//
// A host model plays the part of the microcontroller: for each of the 24 strips
// it raises chip select, sends the strip number, pixel offset 0 and the 75
// colour bytes of 25 pixels, and lowers chip select; then it sends the flush
// byte. Like the real host it waits for flushing to be low before every byte.
// The SPI clock is 1 MHz against the 40 MHz system clock. Every pixel line feeds
// a behavioural WS2812B receiver, and the testbench checks:
//   - every strip shows exactly the bytes sent to it, with correct pulse timing;
//   - all strips start their refresh on the same clock cycle;
//   - a refresh of 25 pixels keeps flushing high for 25*24*50 + 2000 cycles
//     (plus a few cycles of start-up), i.e. about 0.8 ms;
//   - a write with a non-zero pixel offset changes only the pixels it names;
//   - a write to strip number 24 or above changes nothing;
//   - a flush command during a refresh is ignored;
//   - the host has to wait on flushing at least once.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_neopixel_driver;
  import neopixel_pkg::*;

  localparam int unsigned NS     = 24;
  localparam int unsigned LEN    = 25;
  localparam int unsigned NBYTES = 3 * LEN;
  localparam int unsigned EXPECT = NBYTES * 8 * 50 + 2000;
  localparam int unsigned HALF   = 20;            // sclk half period in clk cycles

  logic          clk = 1'b0, reset = 1'b1;
  logic          sclk = 1'b0, mosi = 1'b0, cs = 1'b0;
  logic [NS-1:0] pixels;
  logic          flushing;
  int checks = 0, failures = 0, cyc = 0;
  logic [7:0] image [NS][NBYTES];

  // mechanism counters
  int n_full_frames = 0, n_offset_writes = 0, n_bad_strip = 0, n_ignored_flush = 0;
  int n_host_waits = 0, n_parallel_starts = 0;

  always #12.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  neopixel_driver dut (
    .clk(clk), .reset(reset), .sclk(sclk), .mosi(mosi), .cs(cs),
    .pixels(pixels), .flushing(flushing));

  logic [7:0]  rx_all [NS][128];
  int unsigned frames [NS], nbytes [NS], bad [NS], bits [NS];

  for (genvar i = 0; i < NS; i++) begin : g_rx
    ws2812_strip_model rxm (.clk(clk), .din(reset ? 1'b0 : pixels[i]), .rx(rx_all[i]),
      .frames(frames[i]), .last_frame_bytes(nbytes[i]), .bad_pulses(bad[i]),
      .bits_total(bits[i]));
  end

  // all lines must rise together at the start of a refresh
  logic [NS-1:0] pixels_q = '0;
  logic          flushing_q = 1'b0;
  bit            first_edge_seen = 1'b0;
  int            t_rise = 0, t_fall = 0;
  always @(posedge clk) begin
    if (!reset) begin
      if (flushing && !flushing_q) begin
        first_edge_seen = 1'b0;
        t_rise = cyc;
      end
      if (!flushing && flushing_q) t_fall = cyc;
      if (flushing && !first_edge_seen && (pixels & ~pixels_q) != '0) begin
        first_edge_seen = 1'b1;
        checks++;
        if ((pixels & ~pixels_q) != '1) begin
          failures++;
          $display("FAIL: strips did not start together: %b", pixels & ~pixels_q);
        end else begin
          n_parallel_starts++;
        end
      end
      pixels_q   = pixels;
      flushing_q = flushing;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // the host does what its firmware does: wait until the driver is not flushing
  task automatic spi_byte(input logic [7:0] b, input bit wait_flush = 1'b1);
    if (wait_flush && flushing) begin
      n_host_waits++;
      while (flushing) @(negedge clk);
    end
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (HALF) @(negedge clk);
      sclk = 1'b1;
      repeat (HALF) @(negedge clk);
      sclk = 1'b0;
    end
  endtask

  task automatic cs_high();
    cs = 1'b1;
    repeat (HALF) @(negedge clk);
  endtask

  task automatic cs_low();
    repeat (HALF) @(negedge clk);
    cs = 1'b0;
    repeat (HALF) @(negedge clk);
  endtask

  task automatic write_pixels(input int strip, input int offset, input int npix);
    cs_high();
    spi_byte(8'(strip));
    spi_byte(8'(offset));
    for (int n = 0; n < 3 * npix; n++) begin
      logic [7:0] d;
      d = 8'($urandom);
      if (strip < NS && 3 * offset + n < NBYTES) image[strip][3 * offset + n] = d;
      spi_byte(d);
    end
    cs_low();
  endtask

  task automatic send_flush(input bit wait_flush = 1'b1);
    cs_high();
    spi_byte(8'h46, wait_flush);
    cs_low();
  endtask

  // flush, time the refresh and compare every strip with the image
  task automatic refresh_and_check(input int frame_no);
    int c0, c1;
    send_flush();
    while (!flushing) @(posedge clk);
    while (flushing) @(posedge clk);
    repeat (2) @(posedge clk);
    c0 = t_rise;
    c1 = t_fall;
    check(c1 - c0 >= EXPECT && c1 - c0 <= EXPECT + 6,
          $sformatf("refresh took %0d cycles, expected %0d", c1 - c0, EXPECT));
    repeat (10) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      check(frames[s] == frame_no, $sformatf("strip %0d: %0d frames, expected %0d", s, frames[s], frame_no));
      check(nbytes[s] == NBYTES, $sformatf("strip %0d: %0d bytes", s, nbytes[s]));
      check(bad[s] == 0, $sformatf("strip %0d: %0d pulse errors", s, bad[s]));
      for (int b = 0; b < NBYTES; b++)
        check(rx_all[s][b] == image[s][b],
              $sformatf("strip %0d byte %0d: %h expected %h", s, b, rx_all[s][b], image[s][b]));
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frame_no;
    frame_no = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(negedge clk);
    check(!flushing && pixels == '0, "idle after reset");

    // 1. a whole frame, sent the way the host firmware sends it
    for (int s = 0; s < NS; s++) write_pixels(s, 0, LEN);
    refresh_and_check(++frame_no);
    n_full_frames++;

    // 2. partial updates at pixel offsets, a write to a strip that does not
    //    exist, and a flush sent in the middle of the refresh
    write_pixels(7, 10, 2);
    n_offset_writes++;
    write_pixels(23, 24, 1);
    n_offset_writes++;
    write_pixels(30, 0, 25);     // no strip 30: nothing may change
    n_bad_strip++;
    send_flush();
    frame_no++;
    while (!flushing) @(posedge clk);
    repeat (5000) @(negedge clk);
    send_flush(1'b0);            // does not wait: must be ignored
    while (flushing) @(posedge clk);
    repeat (3000) @(posedge clk);
    check(!flushing, "second flush did not start another refresh");
    if (!flushing && frames[0] == frame_no) n_ignored_flush++;
    for (int s = 0; s < NS; s++) begin
      check(frames[s] == frame_no, $sformatf("strip %0d: %0d frames", s, frames[s]));
      for (int b = 0; b < NBYTES; b++)
        check(rx_all[s][b] == image[s][b],
              $sformatf("after partial update strip %0d byte %0d: %h expected %h",
                        s, b, rx_all[s][b], image[s][b]));
    end

    // 3. the host waits on flushing: a write is attempted during a refresh
    send_flush();
    frame_no++;
    while (!flushing) @(posedge clk);
    write_pixels(0, 0, 1);
    refresh_and_check(++frame_no);

    check(n_full_frames > 0, "full frame never sent");
    check(n_offset_writes > 0, "offset write never made");
    check(n_bad_strip > 0, "bad strip number never sent");
    check(n_ignored_flush > 0, "flush during refresh never ignored");
    check(n_host_waits > 0, "host never had to wait on flushing");
    check(n_parallel_starts >= frame_no, $sformatf("parallel starts %0d", n_parallel_starts));
    $display("full frames %0d, offset writes %0d, bad strip %0d, ignored flush %0d, host waits %0d, parallel starts %0d",
             n_full_frames, n_offset_writes, n_bad_strip, n_ignored_flush, n_host_waits, n_parallel_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
