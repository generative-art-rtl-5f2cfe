// tb_spi_byte_reader: checks byte recovery from an SPI mode-0 stream.
//
// A host model sends frames of random length (chip select high around each
// frame) at sclk = clk/8, MSB first. Every byte_valid pulse must carry the next
// byte sent, exactly one pulse per byte, and only while chip select is high. A
// frame cut off after 3 bits must not leave a partial byte behind: the next
// frame's bytes must still be read correctly. The byte must appear within
// 4 clk cycles of the sclk edge carrying its last bit.
module tb_spi_byte_reader;
  import neopixel_pkg::*;

  logic       clk = 1'b0, reset = 1'b1;
  logic       sclk = 1'b0, mosi = 1'b0, cs = 1'b0;
  logic       byte_valid, cs_active;
  logic [7:0] byte_data;
  int         checks = 0, failures = 0, cyc = 0, last_edge = 0;
  logic [7:0] exp_q [$];

  always #12.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  spi_byte_reader dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic spi_bits(input logic [7:0] b, input int nbits);
    for (int i = 7; i > 7 - nbits; i--) begin
      mosi = b[i];
      repeat (4) @(negedge clk);
      sclk = 1'b1;
      last_edge = cyc;
      repeat (4) @(negedge clk);
      sclk = 1'b0;
    end
  endtask

  always @(posedge clk) begin
    if (!reset && byte_valid) begin
      check(exp_q.size() > 0, "byte_valid with no byte sent");
      if (exp_q.size() > 0) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        check(byte_data == e, $sformatf("byte %h expected %h", byte_data, e));
      end
      check(cyc - last_edge <= 4, $sformatf("latency %0d cycles", cyc - last_edge));
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    sent = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // bits clocked with chip select low are ignored
    spi_bits(8'hFF, 8);
    repeat (10) @(negedge clk);
    for (int f = 0; f < 30; f++) begin
      cs = 1'b1;
      repeat (6) @(negedge clk);
      for (int n = 0; n < $urandom_range(1, 8); n++) begin
        logic [7:0] b;
        b = 8'($urandom);
        exp_q.push_back(b);
        spi_bits(b, 8);
        sent++;
      end
      if (f == 10) spi_bits(8'hC3, 3);   // partial byte, dropped at cs low
      repeat (6) @(negedge clk);
      cs = 1'b0;
      repeat (6) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d bytes never seen", exp_q.size()));
    check(checks >= 3 * sent, "every byte checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
