// io_logic_tb: exercises the five modes with random pin values and codes.
// Normal mode: clamp to 0 / 65535 and truncation to bits 17:2.  Calibration
// modes: pin directions, fuse and offset write strobes, address/value
// routing, the a / a+1 capacitor address, the measurement outputs and the
// correction-register clear.  Expected values come from the pin table.
module io_logic_tb;
  import adc_pkg::*;
  logic cal;
  logic [15:0] data_in;
  logic signed [RAW_W-1:0] word;
  logic [15:0] data_out, data_oe;
  logic [ADDR_W-1:0] addr;
  logic [FUSE_W-1:0] lsbs;
  logic wrfuse, wroff, clrreg;
  io_mode_e mode;
  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0;

  io_logic dut (.cal, .data_in, .word, .data_out, .data_oe, .addr, .lsbs,
                .wrfuse, .wroff, .clrreg, .mode);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cal=%0b din=%h word=%0d out=%h oe=%h addr=%0d lsbs=%h wf=%0b wo=%0b clr=%0b",
               what, cal, data_in, word, data_out, data_oe, addr, lsbs, wrfuse, wroff, clrreg);
    end
  endtask

  initial begin
    // normal mode
    cal = 0;
    for (int t = 0; t < 300; t++) begin
      int w, e;
      w = int'($urandom_range(0, 300000)) - 20000;
      if (t == 0) w = -1;
      if (t == 1) w = 262144;
      if (t == 2) w = 262143;
      if (t == 3) w = 0;
      word = RAW_W'(w);
      data_in = 16'($urandom);
      #1;
      e = (w < 0) ? 0 : (w > 262143) ? 65535 : (w >> 2);
      if (w < 0) n_low++;
      if (w > 262143) n_high++;
      check(data_out == 16'(e) && data_oe == 16'hFFFF, "normal output");
      check(!wrfuse && !wroff && !clrreg && mode == IO_NORMAL, "normal controls");
    end
    check(n_low > 0 && n_high > 0, "clamp cases seen");
    // calibration modes
    cal = 1;
    for (int t = 0; t < 400; t++) begin
      bit off, ck, io;
      data_in = 16'($urandom);
      word = RAW_W'($urandom);
      off = data_in[15]; ck = data_in[14]; io = data_in[13];
      #1;
      check(wrfuse == (io && ck && !off), "wrfuse");
      check(wroff  == (io && ck && off), "wroff");
      check(clrreg == !off, "clrreg");
      check(data_oe[15:13] == 0, "control pins are inputs");
      if (io && !off) begin
        check(mode == IO_WR_FUSE && data_oe == 0, "fuse write dir");
        check(addr == {1'b0, data_in[12:8]} && lsbs == data_in[6:0], "fuse write data");
      end else if (io && off) begin
        check(mode == IO_WR_OFFSET && data_oe == 0, "offset write dir");
        check({addr, lsbs} == data_in[12:0], "offset write data");
      end else if (!io && !off) begin
        check(mode == IO_MEAS_CAP && data_oe == 16'h00FF, "cap meas dir");
        check(data_out[7:0] == word[7:0], "cap meas data");
        check(int'(addr) == int'(data_in[12:8]) + (ck ? 0 : 1), "cap meas address");
      end else begin
        check(mode == IO_MEAS_OFFS && data_oe == 16'h1FFF, "offset meas dir");
        check(data_out[12:0] == word[12:0], "offset meas data");
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
