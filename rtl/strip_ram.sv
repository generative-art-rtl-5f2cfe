// strip_ram: colour memory of one LED strip.
//
// A simple dual-port RAM of DEPTH bytes: one synchronous write port, filled
// from the SPI link, and one read port with a one-cycle registered read, used by
// the strip controller while it sends the strip out. Both ports can be used in
// the same cycle. A read of the address being written returns the old byte.
//
// The registered read and the independent write port follow the design
// description. The depth is this design's own choice: three bytes per pixel for
// the 25 pixels of a strip (the description's RAM always has 256 bytes). A write
// to an address at or beyond DEPTH is dropped, and a read there returns 0.
module strip_ram
  import neopixel_pkg::*;
#(
  parameter int unsigned DEPTH = 75
) (
  input  logic              clk,
  input  logic              write_en,
  input  logic [ADDR_W-1:0] write_addr,
  input  logic [7:0]        write_data,
  input  logic [ADDR_W-1:0] read_addr,
  output logic [7:0]        read_data
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write_en && (32'(write_addr) < DEPTH))
      mem[IDX_W'(write_addr)] <= write_data;
  end

  always_ff @(posedge clk) begin
    if (32'(read_addr) < DEPTH)
      read_data <= mem[IDX_W'(read_addr)];
    else
      read_data <= 8'h00;
  end

endmodule
