// ws2812_byte_tx: sends bytes to a WS2812B data line, one bit at a time.
//
// A byte is loaded into a shift register and handed bit by bit to a
// ws2812_bit_tx, which turns each bit into a pulse. The first bit goes out the
// cycle after the byte is taken and the whole byte takes 8 bit periods (400 clock
// cycles at the default 40 MHz).
//
// Bit order: the transmitter of the design description sends bit 0 of each
// byte first, and that is the default here (MSB_FIRST = 0). WS2812B parts read
// the most significant bit first, so a board that wants every colour byte to
// land unchanged in the LEDs sets MSB_FIRST = 1.
//
// Interface: valid/ready on the byte input. in_ready is high while the
// transmitter is empty and also in the cycle the last bit of the current byte is
// handed to the bit encoder, so a source that keeps in_valid high gets a
// continuous bit stream across byte boundaries (own choice; the description's
// transmitter idles between bytes). idle is high when no byte is held and no bit
// is on the line.
module ws2812_byte_tx
  import neopixel_pkg::*;
#(
  parameter longint unsigned CLK_HZ    = 40_000_000,
  parameter int unsigned     T0H_NS    = 400,
  parameter int unsigned     T1H_NS    = 800,
  parameter int unsigned     BIT_NS    = 1250,
  parameter bit              MSB_FIRST = 1'b0
) (
  input  logic       clk,
  input  logic       reset,      // asynchronous, active high
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       in_ready,
  output logic       dout,
  output logic       idle
);

  logic [7:0] shreg;
  logic [3:0] bits_left;       // 0..8 bits of the current byte still to hand over
  logic       bit_valid, bit_val, bit_ready, bit_busy;

  assign bit_valid = (bits_left != 4'd0);
  assign bit_val   = MSB_FIRST ? shreg[7] : shreg[0];
  assign in_ready  = (bits_left == 4'd0) || (bits_left == 4'd1 && bit_ready);
  assign idle      = (bits_left == 4'd0) && !bit_busy;

  ws2812_bit_tx #(
    .CLK_HZ (CLK_HZ),
    .T0H_NS (T0H_NS),
    .T1H_NS (T1H_NS),
    .BIT_NS (BIT_NS)
  ) u_bit (
    .clk      (clk),
    .reset    (reset),
    .in_valid (bit_valid),
    .in_bit   (bit_val),
    .in_ready (bit_ready),
    .dout     (dout),
    .busy     (bit_busy)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      shreg     <= '0;
      bits_left <= '0;
    end else if (in_valid && in_ready) begin
      shreg     <= in_byte;
      bits_left <= 4'd8;
    end else if (bit_valid && bit_ready) begin
      shreg     <= MSB_FIRST ? {shreg[6:0], 1'b0} : {1'b0, shreg[7:1]};
      bits_left <= bits_left - 4'd1;
    end
  end

endmodule
