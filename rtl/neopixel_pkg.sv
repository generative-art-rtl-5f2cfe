// neopixel_pkg: constants and types shared by the parallel WS2812B strip driver.
//
// The driver receives frames over an SPI link and drives up to 24 NeoPixel
// (WS2812B) strips at once. This package holds the command codes of that link,
// the width of the strip-RAM byte address, and the write bus that carries one
// colour byte from the SPI command decoder to the strip controllers.
//
// Taken from the design description: 24 strips, strip number 0..23 in the first
// byte of a write command, the flush command byte 0x46, pixel offsets of one
// byte. Own choice: the byte address is 11 bits wide. That covers a burst that
// starts at the largest pixel offset (255 * 3 + 2 = 767) and strips of up to 682
// pixels, enough for 24 strips of 417 pixels (10 000 LEDs).
package neopixel_pkg;

  // Number of strip outputs driven in parallel in the standard build.
  localparam int unsigned DEFAULT_NUM_STRIPS = 24;
  localparam int unsigned STRIP_NUM_W = 5;   // bits to hold a strip number 0..23

  // Command byte that starts a flush (write every strip out to its LEDs).
  localparam logic [7:0] FLUSH_CMD = 8'h46;

  // Bytes of colour data per pixel (red, green, blue).
  localparam int unsigned BYTES_PER_PIXEL = 3;

  // Width of a byte address inside one strip RAM.
  localparam int unsigned ADDR_W = 11;

  // One colour byte on its way to a strip RAM.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [7:0]        data;
  } strip_wr_t;

  // States of the SPI command decoder.
  typedef enum logic [1:0] {
    CMD_IDLE,        // waiting for the first byte after chip select rises
    CMD_OFFSET,      // strip number taken, waiting for the pixel offset
    CMD_DATA,        // streaming colour bytes
    CMD_IGNORE       // flush taken or bad strip number: ignore until CS falls
  } cmd_state_e;

  // Cycles of a clock of clk_hz hertz that cover ns nanoseconds, rounded.
  function automatic int unsigned ns_to_cycles(longint unsigned clk_hz,
                                               int unsigned ns);
    return int'((clk_hz * 64'(ns) + 64'd500_000_000) / 64'd1_000_000_000);
  endfunction

endpackage
