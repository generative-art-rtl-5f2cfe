// ws2812_strip_model: behavioural receiver for a WS2812B data line (testbench only).
//
// Stands in for a chain of WS2812B LEDs. It times every high pulse in clock
// cycles and reads it as a 0 (about T0H_CYC long) or a 1 (about T1H_CYC long),
// packs the bits into bytes (least or most significant bit first), and checks
// that successive bits start exactly BIT_CYC cycles apart. A low time of
// RESET_CYC cycles ends a frame: frames counts up, last_frame_bytes gives the
// bytes of that frame, rx holds them (rx[3k..3k+2] are what pixel k of a real
// chain would keep), and the next frame fills rx again from index 0.
// bad_pulses counts pulses of a wrong length, bit periods of a wrong length and
// frames that end in the middle of a byte.
module ws2812_strip_model #(
  parameter int unsigned T0H_CYC   = 16,
  parameter int unsigned T1H_CYC   = 32,
  parameter int unsigned BIT_CYC   = 50,
  parameter int unsigned RESET_CYC = 2000,
  parameter int unsigned TOL_CYC   = 2,
  parameter bit          MSB_FIRST = 1'b0,
  parameter int unsigned MAX_BYTES = 128
) (
  input  logic        clk,
  input  logic        din,
  output logic [7:0]  rx [MAX_BYTES],
  output int unsigned frames,
  output int unsigned last_frame_bytes,
  output int unsigned bad_pulses,
  output int unsigned bits_total
);

  logic        prev = 1'b0;
  int unsigned hi_cnt = 0, lo_cnt = 0, hi_last = 0;
  bit          in_frame = 1'b0;
  logic [7:0]  sh = '0;
  int unsigned nbits = 0, nbytes = 0;

  initial begin
    frames = 0; last_frame_bytes = 0; bad_pulses = 0; bits_total = 0;
    for (int i = 0; i < MAX_BYTES; i++) rx[i] = '0;
  end

  function automatic int unsigned absdiff(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  always @(posedge clk) begin
    if (din) begin
      if (!prev) begin
        if (in_frame && (hi_last + lo_cnt != BIT_CYC)) bad_pulses++;
        hi_cnt = 1;
      end else begin
        hi_cnt++;
      end
      lo_cnt = 0;
    end else begin
      if (prev) begin
        logic b;
        b = 1'b0;
        if (absdiff(hi_cnt, T0H_CYC) <= TOL_CYC)      b = 1'b0;
        else if (absdiff(hi_cnt, T1H_CYC) <= TOL_CYC) b = 1'b1;
        else                                          bad_pulses++;
        sh = MSB_FIRST ? {sh[6:0], b} : {b, sh[7:1]};
        nbits++;
        bits_total++;
        if (nbits % 8 == 0) begin
          if (nbytes < MAX_BYTES) rx[nbytes] = sh;
          nbytes++;
        end
        in_frame = 1'b1;
        hi_last  = hi_cnt;
        lo_cnt   = 1;
      end else begin
        lo_cnt++;
        if (in_frame && lo_cnt == RESET_CYC) begin
          if (nbits % 8 != 0) bad_pulses++;
          frames++;
          last_frame_bytes = nbytes;
          nbytes   = 0;
          nbits    = 0;
          in_frame = 1'b0;
        end
      end
    end
    prev = din;
  end

endmodule
