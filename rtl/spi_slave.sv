// spi_slave: the SPI module of the strip driver.
//
// Receives commands from the host over sclk/mosi/cs (SPI mode 0, MSB first,
// chip select active high) and turns them into strip-RAM writes and flush
// pulses. It is a spi_byte_reader, which recovers bytes in the system clock
// domain, followed by a spi_command_decoder, which interprets them; see those
// two modules for the command format and timing. A colour byte reaches the write
// port 4 clk cycles after the sclk edge that carries its last bit.
module spi_slave
  import neopixel_pkg::*;
#(
  parameter int unsigned NUM_STRIPS = DEFAULT_NUM_STRIPS
) (
  input  logic                   clk,
  input  logic                   reset,      // asynchronous, active high
  input  logic                   sclk,
  input  logic                   mosi,
  input  logic                   cs,         // active high
  output logic                   write_en,
  output logic [STRIP_NUM_W-1:0] strip_num,
  output strip_wr_t              wr,
  output logic                   flush
);

  logic       byte_valid, cs_active;
  logic [7:0] byte_data;

  spi_byte_reader u_reader (
    .clk        (clk),
    .reset      (reset),
    .sclk       (sclk),
    .mosi       (mosi),
    .cs         (cs),
    .byte_valid (byte_valid),
    .byte_data  (byte_data),
    .cs_active  (cs_active)
  );

  spi_command_decoder #(.NUM_STRIPS(NUM_STRIPS)) u_decoder (
    .clk        (clk),
    .reset      (reset),
    .cs_active  (cs_active),
    .byte_valid (byte_valid),
    .byte_data  (byte_data),
    .write_en   (write_en),
    .strip_num  (strip_num),
    .wr         (wr),
    .flush      (flush)
  );

endmodule
