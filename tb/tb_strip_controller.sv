// tb_strip_controller: checks one strip controller end to end, on a 4-pixel strip.
//
// Fills the RAM, pulses flush and decodes data_out with a behavioural WS2812B
// receiver. Checks: the 12 bytes come out in address order; bits are back to
// back; flushing is high for 12*8*50 cycles of data plus the 2000-cycle reset
// time (a few cycles of start-up allowed); the line is low for at least 2000
// cycles before flushing drops; a second flush during a refresh is ignored; a
// write during a refresh is stored and appears in the next refresh.
module tb_strip_controller;
  import neopixel_pkg::*;

  localparam int unsigned LEN    = 4;
  localparam int unsigned NBYTES = 3 * LEN;
  localparam int unsigned EXPECT = NBYTES * 8 * 50 + 2000;

  logic              clk = 1'b0, reset = 1'b1;
  logic              write_en = 1'b0, flush = 1'b0, flushing, data_out;
  logic [ADDR_W-1:0] write_addr = '0;
  logic [7:0]        write_data = '0;
  logic [7:0]        image [NBYTES];
  int                checks = 0, failures = 0, cyc = 0;

  always #12.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  strip_controller #(.STRIP_LENGTH(LEN)) dut (.*);

  logic [7:0]  rx [128];
  int unsigned frames, nbytes, bad, bits;
  ws2812_strip_model rxm (.clk(clk), .din(reset ? 1'b0 : data_out), .rx(rx),
    .frames(frames), .last_frame_bytes(nbytes), .bad_pulses(bad), .bits_total(bits));

  // longest run of low cycles just before flushing falls
  int low_run = 0, low_at_end = 0;
  logic flushing_q = 1'b0;
  always @(posedge clk) begin
    if (data_out) low_run = 0; else low_run++;
    if (flushing_q && !flushing) low_at_end = low_run;
    flushing_q = flushing;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_byte(input int a, input logic [7:0] d);
    @(negedge clk);
    write_en = 1'b1; write_addr = ADDR_W'(a); write_data = d;
    @(negedge clk);
    write_en = 1'b0;
  endtask

  task automatic pulse_flush();
    @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
  endtask

  task automatic refresh_and_check(input int frame_no, input bit extra_flush,
                                   input bit late_write);
    int c0, c1;
    pulse_flush();
    c0 = cyc;
    check(flushing, "flushing high right after flush");
    if (extra_flush) begin
      repeat (1000) @(posedge clk);
      pulse_flush();              // must be ignored
    end
    if (late_write) begin
      while (bits < (frame_no - 1) * NBYTES * 8 + 16) @(posedge clk);
      image[0] = 8'hA5;           // byte 0 is already out: lands in the next refresh
      write_byte(0, image[0]);
    end
    while (flushing) @(posedge clk);
    c1 = cyc;
    repeat (2) @(posedge clk);
    check(c1 - c0 >= EXPECT && c1 - c0 <= EXPECT + 6,
          $sformatf("refresh took %0d cycles, expected %0d", c1 - c0, EXPECT));
    check(low_at_end >= 2000, $sformatf("reset low time %0d", low_at_end));
    repeat (3000) @(posedge clk);
    check(frames == frame_no, $sformatf("frames %0d expected %0d", frames, frame_no));
    check(nbytes == NBYTES, $sformatf("bytes %0d", nbytes));
    check(bad == 0, $sformatf("pulse errors %0d", bad));
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] first0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (3) @(posedge clk);
    check(!flushing && !data_out, "idle after reset");
    for (int a = 0; a < NBYTES; a++) begin
      image[a] = 8'($urandom);
      write_byte(a, image[a]);
    end
    write_byte(NBYTES, 8'hFF);    // beyond the strip: dropped
    repeat (10) @(posedge clk);
    check(!flushing && !data_out, "writes alone start nothing");
    first0 = image[0];
    // refresh 1, with an ignored second flush and a write to byte 0 mid-way
    refresh_and_check(1, 1'b1, 1'b1);
    check(rx[0] == first0, "refresh 1 byte 0 holds the old value");
    for (int a = 1; a < NBYTES; a++)
      check(rx[a] == image[a], $sformatf("refresh 1 byte %0d: %h vs %h", a, rx[a], image[a]));
    // refresh 2 shows the late write
    refresh_and_check(2, 1'b0, 1'b0);
    for (int a = 0; a < NBYTES; a++)
      check(rx[a] == image[a], $sformatf("refresh 2 byte %0d: %h vs %h", a, rx[a], image[a]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
