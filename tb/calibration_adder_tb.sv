// calibration_adder_tb: random raw codes and corrections, including negative
// corrections and sums outside 0..2^18; the output must be raw + corr, loaded
// only in phase-2 cycles.
module calibration_adder_tb;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0, ph1, ph2;
  logic signed [RAW_W-1:0] raw = 0, sum;
  logic signed [CREG_W-1:0] corr = 0;
  int checks = 0, failures = 0;
  int expected;

  phase_gen u_ph (.clk, .rst_n, .ph1, .ph2);
  calibration_adder dut (.clk, .rst_n, .ph2, .raw, .corr, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expected = 0;
    for (int c = 0; c < 400; c++) begin
      raw  = RAW_W'(int'($urandom_range(0, 280000)) - 10000);
      corr = CREG_W'(int'($urandom_range(0, 16383)) - 8192);
      if (ph2) expected = int'(raw) + int'(corr);
      @(posedge clk); #1;
      checks++;
      if (sum != RAW_W'(expected)) begin
        failures++;
        $display("FAIL cycle %0d sum=%0d expected %0d", c, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
