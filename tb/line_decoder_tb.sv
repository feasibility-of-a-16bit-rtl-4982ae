// line_decoder_tb: all 64 addresses; address a in 1..32 must raise exactly
// line a-1, every other address no line.
module line_decoder_tb;
  import adc_pkg::*;
  logic [ADDR_W-1:0] addr;
  logic [FUSE_WORDS-1:0] lines;
  int checks = 0, failures = 0;

  line_decoder dut (.addr, .lines);

  initial begin
    for (int a = 0; a < 64; a++) begin
      logic [31:0] expected;
      addr = ADDR_W'(a);
      #1;
      expected = (a >= 1 && a <= 32) ? (32'd1 << (a - 1)) : 32'd0;
      checks++;
      if (lines != expected) begin
        failures++;
        $display("FAIL addr %0d lines=%h expected %h", a, lines, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
