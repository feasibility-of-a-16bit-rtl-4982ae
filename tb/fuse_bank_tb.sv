// fuse_bank_tb: programs random coefficients into all 32 words, checks that
// every word reads back, that blown fuses cannot be cleared (writes OR in),
// that writes without the strobe or to unbacked addresses change nothing.
module fuse_bank_tb;
  import adc_pkg::*;
  logic clk = 0;
  logic wr = 0;
  logic [ADDR_W-1:0] addr = 0;
  logic [FUSE_W-1:0] value = 0;
  logic [FUSE_W-1:0] word [FUSE_WORDS];
  logic [FUSE_W-1:0] model [FUSE_WORDS];
  int checks = 0, failures = 0;

  fuse_bank dut (.clk, .wr, .addr, .value, .word);

  always #5 clk = ~clk;

  task automatic write(int a, logic [FUSE_W-1:0] v, bit strobe);
    @(negedge clk);
    addr = ADDR_W'(a); value = v; wr = strobe;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic compare(string what);
    for (int i = 0; i < FUSE_WORDS; i++) begin
      checks++;
      if (word[i] !== model[i]) begin
        failures++;
        $display("FAIL %s word %0d = %h expected %h", what, i, word[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < FUSE_WORDS; i++) model[i] = '0;
    #1 compare("unprogrammed");
    for (int i = 0; i < FUSE_WORDS; i++) begin
      logic [FUSE_W-1:0] v;
      v = FUSE_W'($urandom);
      write(i, v, 1);
      model[i] = v;
    end
    compare("programmed");
    write(5, 7'h00, 1);                       // cannot clear fuses
    write(7, 7'h7F, 0);                       // no strobe
    write(40, 7'h7F, 1);                      // unbacked address
    write(3, 7'h7F, 1); model[3] = 7'h7F;     // blowing more fuses
    compare("after extra writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
