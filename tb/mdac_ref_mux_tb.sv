// mdac_ref_mux_tb: random thermometer and line patterns in both modes; the
// switches must follow the flash when calmdac is low, the DSP line when high.
module mdac_ref_mux_tb;
  logic calmdac;
  logic [31:0] therm, lines, sw_high;
  int checks = 0, failures = 0;

  mdac_ref_mux dut (.calmdac, .therm, .lines, .sw_high);

  initial begin
    for (int t = 0; t < 200; t++) begin
      int n;
      n = $urandom_range(0, 32);
      therm   = (n == 32) ? '1 : ((32'd1 << n) - 1);
      lines   = 32'd1 << $urandom_range(0, 31);
      calmdac = t[0];
      #1;
      checks++;
      if (sw_high != (calmdac ? lines : therm)) begin
        failures++;
        $display("FAIL calmdac=%0b sw=%h therm=%h lines=%h", calmdac, sw_high, therm, lines);
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
