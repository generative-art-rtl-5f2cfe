// tb_spi_command_decoder: checks the write and flush command parser.
//
// Bytes are fed straight into the decoder, framed by cs_active. A reference
// model in the testbench predicts, for every byte, whether it must produce a
// write (with strip number, address 3*offset + n and data) or a flush, and the
// testbench checks the outputs one cycle after each byte. Random frames cover:
// write bursts to random strips and offsets, the flush byte 0x46, strip numbers
// of 24 and above (ignored), bytes after a flush (ignored), frames cut short,
// and gaps between bytes. write_en and flush must never pulse on their own.
module tb_spi_command_decoder;
  import neopixel_pkg::*;

  logic                   clk = 1'b0, reset = 1'b1;
  logic                   cs_active = 1'b0, byte_valid = 1'b0;
  logic [7:0]             byte_data = '0;
  logic                   write_en, flush;
  logic [STRIP_NUM_W-1:0] strip_num;
  strip_wr_t              wr;
  int checks = 0, failures = 0;
  int n_writes = 0, n_flushes = 0, n_bad_strip = 0;

  always #12.5ns clk = ~clk;

  spi_command_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference state
  int ref_state;       // 0 first byte, 1 offset, 2 data, 3 ignore
  int ref_strip, ref_addr;

  task automatic send(input logic [7:0] b);
    bit exp_w, exp_f;
    int exp_addr;
    exp_w = 0; exp_f = 0; exp_addr = 0;
    case (ref_state)
      0: if (b == 8'h46) begin exp_f = 1; ref_state = 3; end
         else if (b < 24) begin ref_strip = b; ref_state = 1; end
         else ref_state = 3;
      1: begin ref_addr = 3 * b; ref_state = 2; end
      2: begin exp_w = 1; exp_addr = ref_addr; ref_addr++; end
      default: ;
    endcase
    @(negedge clk);
    byte_valid = 1'b1; byte_data = b;
    @(negedge clk);
    byte_valid = 1'b0;
    check(write_en == exp_w && flush == exp_f,
          $sformatf("byte %h: write_en %0d flush %0d expected %0d %0d", b, write_en, flush, exp_w, exp_f));
    if (exp_w) begin
      n_writes++;
      check(32'(strip_num) == ref_strip && 32'(wr.addr) == exp_addr && wr.data == b,
            $sformatf("write strip %0d addr %0d data %h, expected %0d %0d %h",
                      strip_num, wr.addr, wr.data, ref_strip, exp_addr, b));
    end
    if (exp_f) n_flushes++;
    repeat ($urandom_range(0, 4)) begin
      @(negedge clk);
      check(!write_en && !flush, "stray pulse between bytes");
    end
  endtask

  task automatic frame_start();
    @(negedge clk);
    cs_active = 1'b1;
    ref_state = 0;
  endtask

  task automatic frame_end();
    @(negedge clk);
    cs_active = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // fixed cases first: a full-length write, a flush, a bad strip
    frame_start();
    send(8'd23); send(8'd255);
    for (int i = 0; i < 6; i++) send(8'($urandom));
    frame_end();
    frame_start(); send(8'h46); send(8'd3); send(8'd0); send(8'd7); frame_end();
    frame_start(); send(8'd24); send(8'd0); send(8'd9); frame_end();
    n_bad_strip++;
    // random frames
    for (int f = 0; f < 300; f++) begin
      int kind;
      kind = $urandom_range(0, 9);
      frame_start();
      if (kind == 0) begin
        send(8'h46);
        if ($urandom_range(0, 1)) send(8'($urandom));
      end else if (kind == 1) begin
        send(8'($urandom_range(24, 255)));
        if (ref_state == 3) n_bad_strip++;
        send(8'($urandom_range(0, 23)));
        send(8'($urandom));
      end else begin
        send(8'($urandom_range(0, 23)));
        if ($urandom_range(0, 7) != 0) begin
          send(8'($urandom));
          for (int n = 0; n < $urandom_range(0, 20); n++) send(8'($urandom));
        end
      end
      frame_end();
    end
    check(n_writes > 100 && n_flushes > 10 && n_bad_strip > 10, "all cases exercised");
    $display("writes %0d flushes %0d bad strip numbers %0d", n_writes, n_flushes, n_bad_strip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
