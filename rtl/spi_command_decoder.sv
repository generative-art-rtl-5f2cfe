// spi_command_decoder: turns the bytes of one chip-select frame into RAM writes
// or a flush.
//
// Two commands exist; each starts when chip select rises and ends when it falls.
//   write:  strip number (0..NUM_STRIPS-1), pixel offset (0..255), then any number
//           of colour bytes, three per pixel (red, green, blue as sent).
//   flush:  the single byte 0x46.
// For a write the decoder latches the strip number, turns the pixel offset into
// the byte address 3*offset, and then issues one write per colour byte with a
// one-cycle write_en pulse, the address rising by one per byte, so the pixel
// index rises by one every three bytes. For a flush it pulses flush for one
// cycle. A first byte that is neither command, and anything after a flush byte,
// is ignored until chip select falls.
//
// Taken from the design description: the command formats, the flush byte, the
// pixel offset, one-cycle write and flush pulses. Own choices: bytes after a
// flush or a bad strip number are dropped for the rest of the frame; the byte
// address is 11 bits and wraps after 2048 bytes in one burst (the strip RAM drops
// writes beyond its depth anyway). The decoder's outputs are registered: a write
// or flush appears one cycle after the byte_valid that completes it.
module spi_command_decoder
  import neopixel_pkg::*;
#(
  parameter int unsigned NUM_STRIPS = DEFAULT_NUM_STRIPS
) (
  input  logic                   clk,
  input  logic                   reset,      // asynchronous, active high
  input  logic                   cs_active,
  input  logic                   byte_valid,
  input  logic [7:0]             byte_data,
  output logic                   write_en,
  output logic [STRIP_NUM_W-1:0] strip_num,
  output strip_wr_t              wr,
  output logic                   flush
);

  initial begin
    assert (NUM_STRIPS >= 1 && NUM_STRIPS <= (1 << STRIP_NUM_W))
      else $error("spi_command_decoder: NUM_STRIPS out of range");
  end

  cmd_state_e        state;
  logic [ADDR_W-1:0] next_addr;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= CMD_IDLE;
      next_addr <= '0;
      strip_num <= '0;
      wr        <= '0;
      write_en  <= 1'b0;
      flush     <= 1'b0;
    end else begin
      write_en <= 1'b0;
      flush    <= 1'b0;
      if (!cs_active) begin
        state <= CMD_IDLE;
      end else if (byte_valid) begin
        unique case (state)
          CMD_IDLE: begin
            if (byte_data == FLUSH_CMD) begin
              flush <= 1'b1;
              state <= CMD_IGNORE;
            end else if (32'(byte_data) < NUM_STRIPS) begin
              strip_num <= byte_data[STRIP_NUM_W-1:0];
              state     <= CMD_OFFSET;
            end else begin
              state <= CMD_IGNORE;
            end
          end
          CMD_OFFSET: begin
            // 3 * offset, as shift and add
            next_addr <= ADDR_W'({byte_data, 1'b0}) + ADDR_W'(byte_data);
            state     <= CMD_DATA;
          end
          CMD_DATA: begin
            wr.addr   <= next_addr;
            wr.data   <= byte_data;
            write_en  <= 1'b1;
            next_addr <= next_addr + 1'b1;
          end
          CMD_IGNORE: ;
          default: state <= CMD_IDLE;
        endcase
      end
    end
  end

  // A write and a flush never come from the same byte.
  assert property (@(posedge clk) disable iff (reset) !(write_en && flush));

endmodule
