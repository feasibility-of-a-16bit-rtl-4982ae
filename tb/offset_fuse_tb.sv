// offset_fuse_tb: checks the unprogrammed value, a strobed write, that an
// unstrobed write is ignored and that further writes only set bits.
module offset_fuse_tb;
  import adc_pkg::*;
  logic clk = 0, wr = 0;
  logic [OFFSET_W-1:0] value = 0, offset;
  int checks = 0, failures = 0;

  offset_fuse dut (.clk, .wr, .value, .offset);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: offset=%h", what, offset); end
  endtask

  task automatic write(logic [OFFSET_W-1:0] v, bit strobe);
    @(negedge clk); value = v; wr = strobe;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    #1 check(offset == 0, "unprogrammed");
    write(13'h1F35, 0); check(offset == 0, "no strobe");
    write(13'h1F35, 1); check(offset == 13'h1F35, "programmed");
    write(13'h0000, 1); check(offset == 13'h1F35, "cannot clear");
    write(13'h00CA, 1); check(offset == 13'h1FFF, "OR of writes");
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
