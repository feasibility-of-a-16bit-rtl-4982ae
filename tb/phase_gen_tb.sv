// phase_gen_tb: checks that the two phase enables alternate every clock
// cycle, start with phase 1 after reset, and never overlap.
module phase_gen_tb;
  logic clk = 0, rst_n = 0;
  logic ph1, ph2;
  int checks = 0, failures = 0;

  phase_gen dut (.clk, .rst_n, .ph1, .ph2);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(ph1 && !ph2, "phase 1 during reset");
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      #1;
      check(ph1 == (c % 2 == 0), $sformatf("ph1 in cycle %0d", c));
      check(ph2 == (c % 2 == 1), $sformatf("ph2 in cycle %0d", c));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
