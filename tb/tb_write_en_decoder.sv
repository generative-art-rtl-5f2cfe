// tb_write_en_decoder: exhaustive check of the one-hot write-enable decoder.
//
// For every strip number 0..31 and both values of write_en the output must be
// the single bit strip_num set when write_en is high and strip_num < 24, and
// all zeros otherwise.
module tb_write_en_decoder;
  import neopixel_pkg::*;

  logic                          write_en;
  logic [STRIP_NUM_W-1:0]        strip_num;
  logic [DEFAULT_NUM_STRIPS-1:0] strip_we, expected;
  int checks = 0, failures = 0;

  write_en_decoder dut (.*);

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 32; s++) begin
        write_en  = 1'(e);
        strip_num = STRIP_NUM_W'(s);
        expected  = '0;
        if (e == 1 && s < 24) expected[s] = 1'b1;
        #10ns;
        checks++;
        if (strip_we !== expected) begin
          failures++;
          $display("FAIL: en=%0d strip=%0d got %b", e, s, strip_we);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
