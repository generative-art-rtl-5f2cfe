// strip_controller: keeps the colours of one LED strip and writes them out.
//
// Colour bytes arrive on the write port at any time and are stored in a
// strip_ram. A one-cycle flush pulse starts a refresh: the controller raises
// flushing, reads the RAM from address 0 up to 3*STRIP_LENGTH-1 and streams the
// bytes through a ws2812_byte_tx onto data_out, then holds data_out low for the
// WS2812B reset time (50 us, 2000 cycles at 40 MHz) so the LEDs latch the new
// colours, and finally drops flushing. A flush that arrives while flushing is
// high is ignored. Bytes go out in the order they sit in RAM, which is the order
// the host sent them.
//
// Timing: the bits are back to back (50 cycles each at 40 MHz), so a full
// refresh of 25 pixels lasts 25*24*50 + 2000 cycles plus a few cycles of
// start-up, about 0.8 ms. The next byte is fetched from RAM while the current one
// is still on the line. Sending the whole strip, then the 50 us low time, with a
// flushing flag high for the duration, follows the design description; the
// fetch-ahead and the gapless bit stream are this design's own choices.
module strip_controller
  import neopixel_pkg::*;
#(
  parameter int unsigned     STRIP_LENGTH = 25,          // pixels on the strip
  parameter longint unsigned CLK_HZ       = 40_000_000,
  parameter int unsigned     T0H_NS       = 400,
  parameter int unsigned     T1H_NS       = 800,
  parameter int unsigned     BIT_NS       = 1250,
  parameter int unsigned     RESET_NS     = 50_000,      // low time that latches the LEDs
  parameter bit              MSB_FIRST    = 1'b0
) (
  input  logic              clk,
  input  logic              reset,       // asynchronous, active high
  input  logic              write_en,
  input  logic [ADDR_W-1:0] write_addr,
  input  logic [7:0]        write_data,
  input  logic              flush,
  output logic              flushing,
  output logic              data_out
);

  localparam int unsigned NBYTES    = BYTES_PER_PIXEL * STRIP_LENGTH;
  localparam int unsigned RESET_CYC = ns_to_cycles(CLK_HZ, RESET_NS);
  localparam int unsigned RCNT_W    = $clog2(RESET_CYC + 1);

  initial begin
    assert (NBYTES > 0 && NBYTES <= (1 << ADDR_W))
      else $error("strip_controller: STRIP_LENGTH does not fit the byte address");
  end

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_DRAIN, S_RESET} state_e;

  state_e              state;
  logic [ADDR_W-1:0]   idx;          // RAM address of the byte being fetched or offered
  logic                fetch_wait;   // read of idx issued, data not yet in read_data
  logic                byte_valid;   // read_data holds byte idx, not yet taken
  logic [RCNT_W-1:0]   rcnt;
  logic [7:0]          read_data;
  logic                tx_ready, tx_idle;

  assign flushing = (state != S_IDLE);

  strip_ram #(.DEPTH(NBYTES)) u_ram (
    .clk        (clk),
    .write_en   (write_en),
    .write_addr (write_addr),
    .write_data (write_data),
    .read_addr  (idx),
    .read_data  (read_data)
  );

  ws2812_byte_tx #(
    .CLK_HZ    (CLK_HZ),
    .T0H_NS    (T0H_NS),
    .T1H_NS    (T1H_NS),
    .BIT_NS    (BIT_NS),
    .MSB_FIRST (MSB_FIRST)
  ) u_tx (
    .clk      (clk),
    .reset    (reset),
    .in_valid (byte_valid),
    .in_byte  (read_data),
    .in_ready (tx_ready),
    .dout     (data_out),
    .idle     (tx_idle)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state      <= S_IDLE;
      idx        <= '0;
      fetch_wait <= 1'b0;
      byte_valid <= 1'b0;
      rcnt       <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (flush) begin
            state      <= S_SEND;
            idx        <= '0;
            fetch_wait <= 1'b1;
          end
        end
        S_SEND: begin
          if (fetch_wait) begin
            fetch_wait <= 1'b0;
            byte_valid <= 1'b1;
          end else if (byte_valid && tx_ready) begin
            byte_valid <= 1'b0;
            if (idx == ADDR_W'(NBYTES - 1)) begin
              state <= S_DRAIN;
            end else begin
              idx        <= idx + 1'b1;
              fetch_wait <= 1'b1;
            end
          end
        end
        S_DRAIN: begin
          if (tx_idle) begin
            state <= S_RESET;
            rcnt  <= '0;
          end
        end
        S_RESET: begin
          if (rcnt == RCNT_W'(RESET_CYC - 1)) state <= S_IDLE;
          else                                rcnt  <= rcnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A byte is only ever offered to the transmitter while the strip is being sent.
  assert property (@(posedge clk) disable iff (reset) byte_valid |-> state == S_SEND);
  // The line stays low for the whole reset interval.
  assert property (@(posedge clk) disable iff (reset) state == S_RESET |-> !data_out);

endmodule
