// flash_encoder_tb: drives every thermometer level of the stage-1, stage-2
// and stage-5 encoders (and a bubbled code) and compares the output with the
// ROM coding table: level n gives n-2, n+14 and n+8 respectively.
module flash_encoder_tb;
  logic [31:0] t0, t1;
  logic [15:0] t4;
  logic [5:0]  c0, c1;
  logic [4:0]  c4;
  int checks = 0, failures = 0;

  flash_encoder #(.COMPS(32), .CODE_W(6), .OFFSET(-2)) dut0 (.therm(t0), .code(c0));
  flash_encoder #(.COMPS(32), .CODE_W(6), .OFFSET(14)) dut1 (.therm(t1), .code(c1));
  flash_encoder #(.COMPS(16), .CODE_W(5), .OFFSET(8))  dut4 (.therm(t4), .code(c4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n <= 32; n++) begin
      t0 = (n == 32) ? '1 : ((32'd1 << n) - 1);
      t1 = t0;
      #1;
      check($signed(c0) == n - 2, $sformatf("stage1 level %0d -> %0d", n, $signed(c0)));
      check(int'(c1) == n + 14, $sformatf("stage2 level %0d -> %0d", n, c1));
    end
    // table endpoints as printed: 111110 lowest, 011110 highest, 001110 centre
    t0 = '0;            #1 check(c0 == 6'b111110, "stage1 lowest");
    t0 = '1;            #1 check(c0 == 6'b011110, "stage1 highest");
    t0 = 32'h0000_FFFF; #1 check(c0 == 6'b001110, "stage1 centre");
    for (int n = 0; n <= 16; n++) begin
      t4 = (n == 16) ? '1 : ((16'd1 << n) - 1);
      #1 check(int'(c4) == n + 8, $sformatf("stage5 level %0d -> %0d", n, c4));
    end
    t4 = 16'b0000_0000_1011_1111; // one bubble: 7 comparators tripped
    #1 check(int'(c4) == 15, "bubble counted");
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
