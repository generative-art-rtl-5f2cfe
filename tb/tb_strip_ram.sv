// tb_strip_ram: checks the strip colour RAM against a reference array.
//
// 2000 cycles of random writes and reads, sometimes to the same address in the
// same cycle, with some addresses beyond the depth. The read port must return,
// one cycle after the address, the value the reference holds from before that
// cycle's write; addresses beyond the depth read 0 and ignore writes.
module tb_strip_ram;
  import neopixel_pkg::*;

  localparam int unsigned DEPTH = 75;

  logic              clk = 1'b0;
  logic              write_en = 1'b0;
  logic [ADDR_W-1:0] write_addr = '0, read_addr = '0;
  logic [7:0]        write_data = '0, read_data;
  logic [7:0]        ref_mem [DEPTH];
  logic [7:0]        exp_q;
  int                checks = 0, failures = 0;

  always #12.5ns clk = ~clk;

  strip_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so that every read has a known value
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      write_en = 1'b1; write_addr = ADDR_W'(a); write_data = 8'($urandom);
      ref_mem[a] = write_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      write_en   = 1'($urandom_range(0, 1));
      write_addr = ADDR_W'($urandom_range(0, DEPTH + 10));
      write_data = 8'($urandom);
      read_addr  = ($urandom_range(0, 3) == 0) ? write_addr : ADDR_W'($urandom_range(0, DEPTH + 10));
      exp_q      = (32'(read_addr) < DEPTH) ? ref_mem[read_addr] : 8'h00;
      if (write_en && 32'(write_addr) < DEPTH) ref_mem[write_addr] = write_data;
      @(posedge clk);
      #1;
      checks++;
      if (read_data !== exp_q) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", read_addr, read_data, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
