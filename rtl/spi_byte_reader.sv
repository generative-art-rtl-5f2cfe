// spi_byte_reader: SPI slave receiver that turns the serial stream into bytes.
//
// The host drives sclk, mosi and a chip select. The reader samples mosi on each
// rising edge of sclk, most significant bit first (SPI mode 0), and after every
// eighth bit presents the byte on byte_data with a one-cycle byte_valid pulse.
// While chip select is inactive the bit count is cleared, so every command starts
// on a byte boundary. Chip select is active high, as in the design description
// (the host raises it before a command and lowers it to end one).
//
// Clocking (own choice): the description shifts the bits in with sclk itself
// and moves the result across to the system clock. Here all three SPI inputs are
// brought into the clk domain through two-flop synchronisers and sclk edges are
// found by comparing samples, so the block has one clock. This needs sclk below
// about a quarter of clk (the link runs near 1 MHz against a 40 MHz clock).
// byte_valid rises 3 clk cycles after the sclk edge that carries the last bit.
// cs_active is the synchronised chip select, aligned with byte_valid.
module spi_byte_reader
  import neopixel_pkg::*;
(
  input  logic       clk,
  input  logic       reset,      // asynchronous, active high
  input  logic       sclk,
  input  logic       mosi,
  input  logic       cs,         // active high
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       cs_active
);

  logic [2:0] sclk_s;
  logic [1:0] mosi_s;
  logic [1:0] cs_s;
  logic [2:0] bit_cnt;
  logic [6:0] shreg;
  logic       sclk_rise;

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign cs_active = cs_s[1];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sclk_s <= '0;
      mosi_s <= '0;
      cs_s   <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      mosi_s <= {mosi_s[0], mosi};
      cs_s   <= {cs_s[0], cs};
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      bit_cnt    <= '0;
      shreg      <= '0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
    end else begin
      byte_valid <= 1'b0;
      if (!cs_s[1]) begin
        bit_cnt <= '0;
      end else if (sclk_rise) begin
        shreg   <= {shreg[5:0], mosi_s[1]};
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == 3'd7) begin
          byte_data  <= {shreg, mosi_s[1]};
          byte_valid <= 1'b1;
        end
      end
    end
  end

endmodule
