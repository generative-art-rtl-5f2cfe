// write_en_decoder: routes a RAM write to one strip.
//
// One-hot decodes strip_num into one write enable per strip, qualified by
// write_en: strip_we[i] is high exactly when write_en is high and strip_num == i.
// A strip number at or beyond NUM_STRIPS enables nothing. Purely combinational.
// The decoder sits between the SPI module and the strip controllers as in the
// design description; how it is built is the obvious choice.
module write_en_decoder
  import neopixel_pkg::*;
#(
  parameter int unsigned NUM_STRIPS = DEFAULT_NUM_STRIPS
) (
  input  logic                   write_en,
  input  logic [STRIP_NUM_W-1:0] strip_num,
  output logic [NUM_STRIPS-1:0]  strip_we
);

  always_comb begin
    for (int unsigned i = 0; i < NUM_STRIPS; i++)
      strip_we[i] = write_en && (32'(strip_num) == i);
  end

endmodule
