// correction_register_tb: checks that the register loads term - offset only
// in phase-1 cycles, holds in phase 2, and is zeroed while clear is high.
module correction_register_tb;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0, ph1, ph2, clr = 0;
  logic signed [CTERM_W-1:0] sel_term = 0;
  logic [OFFSET_W-1:0] offset = 0;
  logic signed [CREG_W-1:0] corr;
  int checks = 0, failures = 0;
  int expected;

  phase_gen u_ph (.clk, .rst_n, .ph1, .ph2);
  correction_register dut (.clk, .rst_n, .ph1, .clr, .sel_term, .offset, .corr);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expected = 0;
    for (int c = 0; c < 400; c++) begin
      // drive new inputs every cycle; clear is high in a window and in
      // random single cycles of either phase
      sel_term = CTERM_W'($urandom_range(0, 2047));
      offset   = OFFSET_W'($urandom);
      clr      = (c >= 201 && c < 241) || ($urandom_range(0, 5) == 0);
      if (clr)      expected = 0;
      else if (ph1) expected = int'(sel_term) - int'($signed(offset));
      @(posedge clk); #1;
      checks++;
      if (corr != CREG_W'(expected)) begin
        failures++;
        $display("FAIL cycle %0d corr=%0d expected %0d", c, corr, expected);
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
