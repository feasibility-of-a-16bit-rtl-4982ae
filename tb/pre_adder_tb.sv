// pre_adder_tb: random and extreme fuse contents; every one of the 33
// correction terms is compared with an integer running sum of the signed
// coefficients (wrapped to 11 bits).
module pre_adder_tb;
  import adc_pkg::*;
  logic        [FUSE_W-1:0]  err  [FUSE_WORDS];
  logic signed [CTERM_W-1:0] term [SEG_N];
  int checks = 0, failures = 0;

  pre_adder dut (.err, .term);

  task automatic run(string what);
    int acc;
    #1;
    acc = 0;
    for (int i = 0; i < SEG_N; i++) begin
      if (i > 0) acc += int'($signed(err[i-1]));
      checks++;
      if (term[i] != CTERM_W'(acc)) begin
        failures++;
        $display("FAIL %s term[%0d]=%0d expected %0d", what, i, term[i], acc);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < FUSE_WORDS; j++) err[j] = FUSE_W'($urandom);
      run($sformatf("random %0d", t));
    end
    for (int j = 0; j < FUSE_WORDS; j++) err[j] = 7'h3F;   // +63 each
    run("max positive");
    for (int j = 0; j < FUSE_WORDS; j++) err[j] = (j < 16) ? 7'h40 : 7'h00;  // -64 x16
    run("max negative");
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
