// neopixel_driver: drives up to 24 WS2812B (NeoPixel) LED strips in parallel
// from frames sent over SPI.
//
// A WS2812B strip is written one bit per 1.25 us through a single self-clocked
// data line, so one line can refresh only about a thousand pixels at 30 frames
// per second. This driver gives every strip its own line and its own controller,
// so all strips are refreshed at the same time and the frame time depends on the
// length of one strip only.
//
// Structure: spi_slave decodes host commands into byte writes (strip number,
// byte address, data) and flush pulses. write_en_decoder steers each write to
// one strip. Each strip_controller keeps its strip's colours in a RAM and, on
// flush, sends them out on pixels[i] followed by the 50 us reset time. flushing
// is high while any strip is still being refreshed; the host waits for it to go
// low before it sends more data.
//
// Interface: clk (40 MHz by default), reset (asynchronous, active high), the SPI
// inputs sclk/mosi/cs (mode 0, MSB first, cs active high), the NUM_STRIPS data
// lines pixels and the flushing flag. With the defaults (24 strips of 25 pixels)
// a refresh keeps flushing high for about 0.8 ms.
//
// Follows the design description: the module split, 24 strips of 25 pixels,
// the command set and the flushing handshake. The description's top-level code
// combines the flushing flags with an AND; here they are ORed, so that the flag
// means "some strip is still busy", which is what the host waits on (with every
// strip started by the same flush and of equal length the two agree).
module neopixel_driver
  import neopixel_pkg::*;
#(
  parameter int unsigned     NUM_STRIPS   = DEFAULT_NUM_STRIPS,
  parameter int unsigned     STRIP_LENGTH = 25,          // pixels per strip
  parameter longint unsigned CLK_HZ       = 40_000_000,
  parameter int unsigned     T0H_NS       = 400,
  parameter int unsigned     T1H_NS       = 800,
  parameter int unsigned     BIT_NS       = 1250,
  parameter int unsigned     RESET_NS     = 50_000,
  parameter bit              MSB_FIRST    = 1'b0
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  sclk,
  input  logic                  mosi,
  input  logic                  cs,
  output logic [NUM_STRIPS-1:0] pixels,
  output logic                  flushing
);

  logic                   write_en, flush;
  logic [STRIP_NUM_W-1:0] strip_num;
  strip_wr_t              wr;
  logic [NUM_STRIPS-1:0]  strip_we;
  logic [NUM_STRIPS-1:0]  strip_flushing;

  spi_slave #(.NUM_STRIPS(NUM_STRIPS)) u_spi (
    .clk       (clk),
    .reset     (reset),
    .sclk      (sclk),
    .mosi      (mosi),
    .cs        (cs),
    .write_en  (write_en),
    .strip_num (strip_num),
    .wr        (wr),
    .flush     (flush)
  );

  write_en_decoder #(.NUM_STRIPS(NUM_STRIPS)) u_dec (
    .write_en  (write_en),
    .strip_num (strip_num),
    .strip_we  (strip_we)
  );

  for (genvar i = 0; i < NUM_STRIPS; i++) begin : g_strip
    strip_controller #(
      .STRIP_LENGTH (STRIP_LENGTH),
      .CLK_HZ       (CLK_HZ),
      .T0H_NS       (T0H_NS),
      .T1H_NS       (T1H_NS),
      .BIT_NS       (BIT_NS),
      .RESET_NS     (RESET_NS),
      .MSB_FIRST    (MSB_FIRST)
    ) u_ctrl (
      .clk        (clk),
      .reset      (reset),
      .write_en   (strip_we[i]),
      .write_addr (wr.addr),
      .write_data (wr.data),
      .flush      (flush),
      .flushing   (strip_flushing[i]),
      .data_out   (pixels[i])
    );
  end

  assign flushing = |strip_flushing;

endmodule
