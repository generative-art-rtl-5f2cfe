// tb_ws2812_byte_tx: checks the byte serialiser in both bit orders.
//
// Two transmitters, one sending bit 0 first (the default) and one sending bit 7
// first, get the same 40 random bytes, offered back to back. A behavioural
// WS2812B receiver on each line decodes the pulses; the bytes it recovers must
// equal the bytes sent, every bit period must be 50 cycles with no gap at byte
// boundaries, and the burst must take 40 * 8 * 50 cycles.
module tb_ws2812_byte_tx;
  import neopixel_pkg::*;

  localparam int unsigned NB = 40;

  logic       clk = 1'b0, reset = 1'b1;
  logic       in_valid = 1'b0;
  logic [7:0] in_byte = '0;
  logic       rdy_l, rdy_m, dout_l, dout_m, idle_l, idle_m;
  int         checks = 0, failures = 0;
  logic [7:0] sent [NB];

  always #12.5ns clk = ~clk;

  ws2812_byte_tx #(.MSB_FIRST(1'b0)) dut_lsb (
    .clk(clk), .reset(reset), .in_valid(in_valid), .in_byte(in_byte),
    .in_ready(rdy_l), .dout(dout_l), .idle(idle_l));
  ws2812_byte_tx #(.MSB_FIRST(1'b1)) dut_msb (
    .clk(clk), .reset(reset), .in_valid(in_valid), .in_byte(in_byte),
    .in_ready(rdy_m), .dout(dout_m), .idle(idle_m));

  logic [7:0]  rx_l [128], rx_m [128];
  int unsigned fr_l, fr_m, nb_l, nb_m, bad_l, bad_m, bits_l, bits_m;

  ws2812_strip_model #(.MSB_FIRST(1'b0), .RESET_CYC(300)) rx_lsb (
    .clk(clk), .din(reset ? 1'b0 : dout_l), .rx(rx_l), .frames(fr_l),
    .last_frame_bytes(nb_l), .bad_pulses(bad_l), .bits_total(bits_l));
  ws2812_strip_model #(.MSB_FIRST(1'b1), .RESET_CYC(300)) rx_msb (
    .clk(clk), .din(reset ? 1'b0 : dout_m), .rx(rx_m), .frames(fr_m),
    .last_frame_bytes(nb_m), .bad_pulses(bad_m), .bits_total(bits_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, c1, cyc;
    cyc = 0;
    fork
      forever begin @(posedge clk); cyc++; end
    join_none
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(posedge clk);
    check(idle_l && idle_m && rdy_l && !dout_l, "idle after reset");
    @(negedge clk);
    c0 = cyc;
    for (int i = 0; i < NB; i++) begin
      sent[i]  = 8'($urandom);
      in_valid = 1'b1;
      in_byte  = sent[i];
      @(posedge clk);
      while (!rdy_l) @(posedge clk);
      check(rdy_m, "both transmitters ready together");
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!idle_l) @(posedge clk);
    c1 = cyc;
    check(c1 - c0 >= NB * 400 && c1 - c0 <= NB * 400 + 3,
          $sformatf("burst took %0d cycles", c1 - c0));
    repeat (400) @(posedge clk);
    check(fr_l == 1 && fr_m == 1, "one frame seen on each line");
    check(nb_l == NB && nb_m == NB, $sformatf("bytes decoded %0d/%0d", nb_l, nb_m));
    check(bad_l == 0 && bad_m == 0, $sformatf("pulse errors %0d/%0d", bad_l, bad_m));
    for (int i = 0; i < NB; i++) begin
      check(rx_l[i] == sent[i], $sformatf("LSB-first byte %0d: %h vs %h", i, rx_l[i], sent[i]));
      check(rx_m[i] == sent[i], $sformatf("MSB-first byte %0d: %h vs %h", i, rx_m[i], sent[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
