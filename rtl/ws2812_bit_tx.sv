// ws2812_bit_tx: encodes single bits as WS2812B (NeoPixel) pulses.
//
// A WS2812B data line carries one bit per fixed period. The line is high at the
// start of the period and low for the rest; a short high time means 0 and a long
// one means 1. With the default 40 MHz clock a bit lasts 50 cycles (1.25 us): a 0
// is 16 cycles high then 34 low (0.40 us / 0.85 us), a 1 is 32 high then 18 low
// (0.80 us / 0.45 us). These are the nominal WS2812B timings and the 40 MHz clock
// of the design; the cycle counts are worked out from the parameters, so another
// clock only needs CLK_HZ changed.
//
// Interface: a valid/ready input. in_bit is taken in the cycle in_valid and
// in_ready are both high; its pulse appears on dout from the next cycle. in_ready
// is also high in the last cycle of a bit, so a source that always has the next
// bit ready gets back-to-back bits with no idle time between them (the design
// description's transmitter returns to an idle state between bits; running
// gapless is this design's own choice). dout is driven from a flip-flop so the pin
// cannot glitch, and rests low while nothing is sent. busy is high while a bit is
// on the line.
module ws2812_bit_tx
  import neopixel_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 40_000_000, // system clock
  parameter int unsigned     T0H_NS = 400,        // high time of a 0
  parameter int unsigned     T1H_NS = 800,        // high time of a 1
  parameter int unsigned     BIT_NS = 1250        // whole bit period (TxH + TxL)
) (
  input  logic clk,
  input  logic reset,      // asynchronous, active high
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic dout,
  output logic busy
);

  localparam int unsigned T0H_CYC = ns_to_cycles(CLK_HZ, T0H_NS);
  localparam int unsigned T1H_CYC = ns_to_cycles(CLK_HZ, T1H_NS);
  localparam int unsigned BIT_CYC = ns_to_cycles(CLK_HZ, BIT_NS);
  localparam int unsigned CNT_W   = $clog2(BIT_CYC);

  initial begin
    assert (T0H_CYC > 0 && T0H_CYC < T1H_CYC && T1H_CYC < BIT_CYC)
      else $error("ws2812_bit_tx: pulse timings do not fit the bit period");
  end

  logic             active, active_d;
  logic             cur_bit, cur_bit_d;
  logic [CNT_W-1:0] cnt, cnt_d;
  logic             last;
  logic             dout_d;

  assign last     = (cnt == CNT_W'(BIT_CYC - 1));
  assign in_ready = !active || last;
  assign busy     = active;

  always_comb begin
    active_d  = active;
    cur_bit_d = cur_bit;
    cnt_d     = cnt;
    if (in_valid && in_ready) begin
      active_d  = 1'b1;
      cur_bit_d = in_bit;
      cnt_d     = '0;
    end else if (active && last) begin
      active_d  = 1'b0;
      cnt_d     = '0;
    end else if (active) begin
      cnt_d     = cnt + 1'b1;
    end
    dout_d = active_d &&
             (cnt_d < (cur_bit_d ? CNT_W'(T1H_CYC) : CNT_W'(T0H_CYC)));
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      active  <= 1'b0;
      cur_bit <= 1'b0;
      cnt     <= '0;
      dout    <= 1'b0;
    end else begin
      active  <= active_d;
      cur_bit <= cur_bit_d;
      cnt     <= cnt_d;
      dout    <= dout_d;
    end
  end

  // The line rests low whenever no bit is being sent.
  assert property (@(posedge clk) disable iff (reset) !active |-> !dout);

endmodule
