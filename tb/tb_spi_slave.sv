// tb_spi_slave: checks the SPI module from serial pins to write/flush outputs.
//
// A host model sends write commands (strip, pixel offset, colour bytes) and
// flush commands over sclk/mosi/cs at sclk = clk/8, chip select high around
// each command. The testbench logs every write and flush the module produces
// and compares the log with what the commands call for: strip number, byte
// address 3*offset + n, data, in order, and one flush pulse per flush command.
// It also checks that each write appears within 4 clk cycles of the sclk edge
// that completes its byte.
module tb_spi_slave;
  import neopixel_pkg::*;

  typedef struct {
    bit   is_flush;
    int   strip;
    int   addr;
    logic [7:0] data;
  } event_t;

  logic                   clk = 1'b0, reset = 1'b1;
  logic                   sclk = 1'b0, mosi = 1'b0, cs = 1'b0;
  logic                   write_en, flush;
  logic [STRIP_NUM_W-1:0] strip_num;
  strip_wr_t              wr;
  int checks = 0, failures = 0, cyc = 0, last_edge = 0;
  event_t exp_q [$];

  always #12.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  spi_slave dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic spi_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      mosi = b[i];
      repeat (4) @(negedge clk);
      sclk = 1'b1;
      last_edge = cyc;
      repeat (4) @(negedge clk);
      sclk = 1'b0;
    end
  endtask

  task automatic cmd_write(input int strip, input int offset, input int nbytes);
    cs = 1'b1;
    repeat (4) @(negedge clk);
    spi_byte(8'(strip));
    spi_byte(8'(offset));
    for (int n = 0; n < nbytes; n++) begin
      logic [7:0] d;
      d = 8'($urandom);
      if (strip < 24) exp_q.push_back('{0, strip, 3 * offset + n, d});
      spi_byte(d);
    end
    repeat (4) @(negedge clk);
    cs = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  task automatic cmd_flush();
    cs = 1'b1;
    repeat (4) @(negedge clk);
    spi_byte(8'h46);
    exp_q.push_back('{1, 0, 0, 8'h00});
    repeat (4) @(negedge clk);
    cs = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (!reset && (write_en || flush)) begin
      check(cyc - last_edge <= 5, $sformatf("output %0d cycles after sclk edge", cyc - last_edge));
      check(exp_q.size() > 0, "unexpected write or flush");
      if (exp_q.size() > 0) begin
        event_t e;
        e = exp_q.pop_front();
        if (e.is_flush)
          check(flush && !write_en, "expected a flush");
        else
          check(write_en && !flush && 32'(strip_num) == e.strip && 32'(wr.addr) == e.addr &&
                wr.data == e.data,
                $sformatf("write s%0d a%0d d%h, expected s%0d a%0d d%h", strip_num, wr.addr,
                          wr.data, e.strip, e.addr, e.data));
      end
    end
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (3) @(negedge clk);
    cmd_write(0, 0, 75);
    cmd_flush();
    cmd_write(23, 24, 3);
    cmd_write(30, 0, 3);          // no such strip: ignored
    cmd_write(5, 255, 3);
    for (int k = 0; k < 20; k++) begin
      if ($urandom_range(0, 4) == 0) cmd_flush();
      else cmd_write($urandom_range(0, 23), $urandom_range(0, 24), $urandom_range(0, 9));
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d expected events missing", exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
