// correction_selector_tb: loads distinct values into the 33 terms and checks
// that flash code c (-2..30) selects term c+2, and that the unused codes 31
// and -3..-32 select zero.
module correction_selector_tb;
  import adc_pkg::*;
  logic signed [CTERM_W-1:0] term [SEG_N];
  logic [5:0] code;
  logic signed [CTERM_W-1:0] sel_term;
  int checks = 0, failures = 0;

  correction_selector dut (.term, .code, .sel_term);

  initial begin
    for (int i = 0; i < SEG_N; i++) term[i] = CTERM_W'(37 * i - 600);
    for (int c = -32; c < 32; c++) begin
      int expected;
      code = 6'(c);
      #1;
      expected = (c >= -2 && c <= 30) ? 37 * (c + 2) - 600 : 0;
      checks++;
      if (sel_term != CTERM_W'(expected)) begin
        failures++;
        $display("FAIL code %0d: %0d expected %0d", c, sel_term, expected);
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
